// tb_siphash_core: self-checking test of siphash_core in all four variants
// (SipHash, extended SipHash, HalfSipHash, extended HalfSipHash), with
// SipHash-2-4 and SipHash-4-8 round counts, several message lengths (block
// multiples and partial final blocks) and several pipeline depths. Every
// hash and its latency are compared with a sequential reference model;
// the reference model itself is checked against the published SipHash-2-4
// test vector (key 00..0f, message 00..0e -> a129ca6149be45e5).
module tb_siphash_core;
  import hash_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 6;
  int   c_checks [NC];
  int   c_fail   [NC];
  logic c_done   [NC];
  logic [127:0] h24;
  logic [127:0] h_a, h_b, h_c, h_d, h_e;

  // published vector, 15-byte message, SipHash-2-4, one layer per stage
  sip_case #(.W(64), .EXT(0), .C(2), .D(4), .MSG_BYTES(15), .OPS(1), .N_MSG(12)) u0 (
    .clk, .rst_n, .checks(c_checks[0]), .failures(c_fail[0]), .done(c_done[0]), .first_hash(h24));
  // SipHash-4-8, two full blocks, three layers per stage
  sip_case #(.W(64), .EXT(0), .C(4), .D(8), .MSG_BYTES(16), .OPS(3), .N_MSG(20)) u1 (
    .clk, .rst_n, .checks(c_checks[1]), .failures(c_fail[1]), .done(c_done[1]), .first_hash(h_a));
  // extended SipHash-4-8, 21 bytes
  sip_case #(.W(64), .EXT(1), .C(4), .D(8), .MSG_BYTES(21), .OPS(2), .N_MSG(20)) u2 (
    .clk, .rst_n, .checks(c_checks[2]), .failures(c_fail[2]), .done(c_done[2]), .first_hash(h_b));
  // HalfSipHash-2-4, 13 bytes
  sip_case #(.W(32), .EXT(0), .C(2), .D(4), .MSG_BYTES(13), .OPS(1), .N_MSG(20)) u3 (
    .clk, .rst_n, .checks(c_checks[3]), .failures(c_fail[3]), .done(c_done[3]), .first_hash(h_c));
  // extended HalfSipHash-4-8, 8 bytes
  sip_case #(.W(32), .EXT(1), .C(4), .D(8), .MSG_BYTES(8), .OPS(4), .N_MSG(20)) u4 (
    .clk, .rst_n, .checks(c_checks[4]), .failures(c_fail[4]), .done(c_done[4]), .first_hash(h_d));
  // SipHash-4-8, 3 bytes, whole chain in one stage (combinational core + output register)
  sip_case #(.W(64), .EXT(0), .C(4), .D(8), .MSG_BYTES(3), .OPS(1000), .N_MSG(10)) u5 (
    .clk, .rst_n, .checks(c_checks[5]), .failures(c_fail[5]), .done(c_done[5]), .first_hash(h_e));

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
    bytes_t m;
    logic [127:0] k;
    m = {};
    for (int j = 0; j < 15; j++) m.push_back(8'(j));
    for (int j = 0; j < 16; j++) k[8*j +: 8] = 8'(j);
    checks++;
    if (siphash_ref(64, 0, 2, 4, m, k) !== 128'h0000_0000_0000_0000_a129_ca61_49be_45e5) begin
      failures++;
      $display("reference model disagrees with the published SipHash-2-4 vector");
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (c_done[0] && c_done[1] && c_done[2] && c_done[3] && c_done[4] && c_done[5]);
    @(posedge clk);
    checks++;
    if (h24[63:0] !== 64'ha129ca6149be45e5) begin
      failures++;
      $display("core output %h differs from the published vector", h24[63:0]);
    end
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
