// tb_chaskey_core: self-checking test of chaskey_core with complete and padded last
// blocks, one to four blocks, 8/12/16 rounds and several pipeline depths;
// every tag and its latency are compared with a sequential reference model.
module tb_chaskey_core;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 6;
  int   c_checks [NC];
  int   c_fail   [NC];
  logic c_done   [NC];
  logic [127:0] fh [NC];

  // one byte: padded last block, 12 rounds, deepest pipeline
  chaskey_case #(.ROUNDS(12), .MSG_BYTES(1), .OPS(1), .N_MSG(15)) u0 (
    .clk, .rst_n, .checks(c_checks[0]), .failures(c_fail[0]), .done(c_done[0]), .first_hash(fh[0]));
  // one complete block (subkey K1)
  chaskey_case #(.ROUNDS(12), .MSG_BYTES(16), .OPS(2), .N_MSG(15)) u1 (
    .clk, .rst_n, .checks(c_checks[1]), .failures(c_fail[1]), .done(c_done[1]), .first_hash(fh[1]));
  // two blocks, padded last block, 8 rounds
  chaskey_case #(.ROUNDS(8), .MSG_BYTES(17), .OPS(3), .N_MSG(15)) u2 (
    .clk, .rst_n, .checks(c_checks[2]), .failures(c_fail[2]), .done(c_done[2]), .first_hash(fh[2]));
  // four complete blocks (default length)
  chaskey_case #(.ROUNDS(12), .MSG_BYTES(64), .OPS(1), .N_MSG(20)) u3 (
    .clk, .rst_n, .checks(c_checks[3]), .failures(c_fail[3]), .done(c_done[3]), .first_hash(fh[3]));
  // three blocks, 16 rounds
  chaskey_case #(.ROUNDS(16), .MSG_BYTES(40), .OPS(5), .N_MSG(15)) u4 (
    .clk, .rst_n, .checks(c_checks[4]), .failures(c_fail[4]), .done(c_done[4]), .first_hash(fh[4]));
  // whole chain in one stage
  chaskey_case #(.ROUNDS(12), .MSG_BYTES(7), .OPS(1000), .N_MSG(10)) u5 (
    .clk, .rst_n, .checks(c_checks[5]), .failures(c_fail[5]), .done(c_done[5]), .first_hash(fh[5]));

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
    wait (c_done[0] && c_done[1] && c_done[2] && c_done[3] && c_done[4] && c_done[5]);
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
