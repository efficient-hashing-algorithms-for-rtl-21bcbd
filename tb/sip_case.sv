// sip_case: drives one siphash_core configuration with a stream of messages
// (the first one is the standard test input: bytes 00,01,02,... under key
// 00,01,...,0f), with random idle cycles between them, and checks every
// hash and its latency against hash_ref_pkg::siphash_ref.
module sip_case
  import hash_ref_pkg::*;
#(
  parameter int W         = 64,
  parameter bit EXT       = 1'b0,
  parameter int C         = 4,
  parameter int D         = 8,
  parameter int MSG_BYTES = 16,
  parameter int OPS       = 1,
  parameter int N_MSG     = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done,
  output logic [2*W-1:0] first_hash
);
  localparam int OUT_W = EXT ? 2 * W : W;
  // expected latency: init, per block (inject, 4C round layers, absorb),
  // fin constant, 4D rounds, [fin2, 4D rounds], output XOR
  localparam int NBLK   = MSG_BYTES / (W / 8) + 1;
  localparam int LAYERS = 1 + NBLK * (2 + 4 * C) + 2 + 4 * D + (EXT ? 1 + 4 * D : 0);
  localparam int LAT    = (LAYERS + OPS - 1) / OPS;

  logic                   in_valid;
  logic [MSG_BYTES*8-1:0] msg;
  logic [2*W-1:0]         key;
  logic                   out_valid;
  logic [OUT_W-1:0]       hash;

  siphash_core #(.W(W), .EXTENDED(EXT), .C_ROUNDS(C), .D_ROUNDS(D),
                 .MSG_BYTES(MSG_BYTES), .OPS_PER_STAGE(OPS)) dut (
    .clk, .rst_n, .in_valid, .msg, .key, .out_valid, .hash);

  logic [OUT_W-1:0] exp_q [$];
  int               t_q   [$];
  int               cycle, sent, got;

  always_ff @(posedge clk) cycle <= rst_n ? cycle + 1 : 0;

  // stimulus
  initial begin
    bytes_t m;
    logic [127:0] k;
    checks = 0; failures = 0; done = 1'b0; sent = 0; got = 0;
    in_valid = 1'b0; msg = '0; key = '0; first_hash = '0;
    @(posedge clk iff rst_n);
    while (sent < N_MSG) begin
      if (sent > 0 && $urandom_range(3) == 0) begin
        in_valid <= 1'b0;
      end else begin
        m = {};
        k = '0;
        for (int j = 0; j < MSG_BYTES; j++)
          m.push_back(sent == 0 ? 8'(j) : 8'($urandom));
        for (int j = 0; j < 16; j++) k[8*j +: 8] = (sent == 0) ? 8'(j) : 8'($urandom);
        if (W == 32) k[127:64] = '0;
        for (int j = 0; j < MSG_BYTES; j++) msg[8*j +: 8] <= m[j];
        key      <= k[2*W-1:0];
        in_valid <= 1'b1;
        exp_q.push_back(OUT_W'(siphash_ref(W, EXT, C, D, m, k)));
        t_q.push_back(cycle);
        sent++;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end

  // response check
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("sip_case W=%0d EXT=%0d: unexpected output", W, EXT);
      end else begin
        logic [OUT_W-1:0] e;
        int t0;
        e  = exp_q.pop_front();
        t0 = t_q.pop_front();
        checks += 2;
        if (got == 0) first_hash <= (2*W)'(hash);
        if (hash !== e) begin
          failures++;
          $display("sip_case W=%0d EXT=%0d C=%0d D=%0d L=%0d: hash %h, expected %h",
                   W, EXT, C, D, MSG_BYTES, hash, e);
        end
        // t0 is the cycle on which the stimulus was driven; the core samples
        // it on the following edge, hence the extra cycle
        if (cycle - t0 != LAT + 1) begin
          failures++;
          $display("sip_case W=%0d EXT=%0d: latency %0d, expected %0d", W, EXT, cycle - t0 - 1, LAT);
        end
        got++;
        if (got == N_MSG) done <= 1'b1;
      end
    end
  end
endmodule
