// tb_spooky_short: self-checking test of spooky_short for message lengths that take
// every path of the short form (tail only, half block, full blocks, empty
// tail) up to 64 bytes and several pipeline depths; every hash and its latency
// are compared with a sequential reference model.
module tb_spooky_short;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 5;
  int   c_checks [NC];
  int   c_fail   [NC];
  logic c_done   [NC];
  logic [127:0] fh [NC];

  // one tail byte only
  spooky_case #(.MSG_BYTES(1), .OPS(1), .N_MSG(15)) u0 (
    .clk, .rst_n, .checks(c_checks[0]), .failures(c_fail[0]), .done(c_done[0]), .first_hash(fh[0]));
  // half block, empty tail (constant added)
  spooky_case #(.MSG_BYTES(16), .OPS(1), .N_MSG(15)) u1 (
    .clk, .rst_n, .checks(c_checks[1]), .failures(c_fail[1]), .done(c_done[1]), .first_hash(fh[1]));
  // half block and 15-byte tail
  spooky_case #(.MSG_BYTES(31), .OPS(3), .N_MSG(15)) u2 (
    .clk, .rst_n, .checks(c_checks[2]), .failures(c_fail[2]), .done(c_done[2]), .first_hash(fh[2]));
  // two full blocks (default length)
  spooky_case #(.MSG_BYTES(64), .OPS(1), .N_MSG(20)) u3 (
    .clk, .rst_n, .checks(c_checks[3]), .failures(c_fail[3]), .done(c_done[3]), .first_hash(fh[3]));
  // whole chain in one stage
  spooky_case #(.MSG_BYTES(9), .OPS(1000), .N_MSG(10)) u4 (
    .clk, .rst_n, .checks(c_checks[4]), .failures(c_fail[4]), .done(c_done[4]), .first_hash(fh[4]));

  int checks = 0, failures = 0;

  task automatic finish();
    for (int i = 0; i < NC; i++) begin
      checks   += c_checks[i];
      failures += c_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (c_done[0] && c_done[1] && c_done[2] && c_done[3] && c_done[4]);
    @(posedge clk);
    finish();
  end

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end
endmodule
