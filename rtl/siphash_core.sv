// siphash_core: fully unrolled, variably pipelined SipHash-c-d.
//
// One module covers the four SipHash variants of the library:
//   W = 64, EXTENDED = 0 : SipHash, 64-bit state words, 64-bit hash
//   W = 64, EXTENDED = 1 : extended SipHash, 128-bit hash
//   W = 32, EXTENDED = 0 : HalfSipHash, 32-bit state words, 32-bit hash
//   W = 32, EXTENDED = 1 : extended HalfSipHash, 64-bit hash
// The defaults are SipHash-4-8 (4 compression, 8 finalisation rounds).
//
// The message length MSG_BYTES is fixed when the core is built, so the whole
// computation (initialisation, one compression per W/8-byte block including
// the final block that carries the length byte, finalisation, and for the
// extended variants the second finalisation) unrolls into a chain of layers.
// Each SipRound is split into four layers: add, rotate-xor, add, rotate-xor.
// Message injection (v3 ^= m), absorption (v0 ^= m), the finalisation
// constant XORs and the output XOR are one layer each. A register follows
// every OPS_PER_STAGE-th layer (see hash_pkg), so OPS_PER_STAGE = 1 puts a
// register between every pair of dependent operations.
//
// Interface: a message is accepted on every clock where in_valid is high
// (no back-pressure; one hash per clock). msg holds the message bytes with
// byte 0 in msg[7:0]; key holds the 2W-bit secret key with byte 0 in
// key[7:0]. out_valid/hash appear exactly LATENCY cycles later; hash[W-1:0]
// is the first output word (little-endian byte order as in the reference
// software). Only the valid flags are reset; data registers are not.
//
// The variants, round counts and the deep/variable pipelining follow the
// design's description; the fixed-length unrolled organisation, the layer
// split and the port conventions are this implementation's choices.
module siphash_core
  import hash_pkg::*;
#(
  parameter int unsigned W             = 64,   // state word width: 64 or 32
  parameter bit          EXTENDED      = 1'b0, // output 2W bits instead of W
  parameter int unsigned C_ROUNDS      = 4,    // compression rounds per block
  parameter int unsigned D_ROUNDS      = 8,    // finalisation rounds
  parameter int unsigned MSG_BYTES     = 64,   // message length in bytes
  parameter int unsigned OPS_PER_STAGE = 1,    // layers per pipeline stage
  localparam int unsigned OUT_W        = EXTENDED ? 2 * W : W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [MSG_BYTES*8-1:0] msg,
  input  logic [2*W-1:0]         key,
  output logic                   out_valid,
  output logic [OUT_W-1:0]       hash
);

  localparam int unsigned WB  = W / 8;                  // bytes per block
  localparam int unsigned NB  = MSG_BYTES / WB + 1;     // blocks incl. length block
  localparam int unsigned PB  = 2 + 4 * C_ROUNDS;       // layers per block
  localparam int unsigned NF  = 2 + 4 * D_ROUNDS + (EXTENDED ? 1 + 4 * D_ROUNDS : 0);
  localparam int unsigned NL  = 1 + NB * PB + NF;       // total layers
  localparam int unsigned LATENCY = pipe_latency(NL, OPS_PER_STAGE);

  // layer kinds
  localparam int unsigned K_INIT = 0, K_INJECT = 1, K_ROUND = 2, K_ABSORB = 3,
                          K_FIN1 = 4, K_FIN2 = 5, K_OUT = 6;

  typedef struct packed {
    logic [3:0][W-1:0] v;      // v[0]..v[3]
    logic [W-1:0]      h0;     // first output word (extended variants)
    logic [W-1:0]      h1;     // last output word
    logic [NB*W-1:0]   m;      // padded message: data bytes, zeros, length byte
  } pipe_t;

  // ---- layer schedule (constant) -------------------------------------------
  function automatic int unsigned layer_code(input int unsigned idx);
    int unsigned f;
    if (idx == 0) return layer_enc(K_INIT, 0);
    if (idx - 1 < NB * PB) begin
      int unsigned b, o;
      b = (idx - 1) / PB;
      o = (idx - 1) % PB;
      if (o == 0)      return layer_enc(K_INJECT, b);
      if (o == PB - 1) return layer_enc(K_ABSORB, b);
      return layer_enc(K_ROUND, (o - 1) % 4);
    end
    f = idx - 1 - NB * PB;
    if (f == 0)                   return layer_enc(K_FIN1, 0);
    if (f <= 4 * D_ROUNDS)        return layer_enc(K_ROUND, (f - 1) % 4);
    if (f == NF - 1)              return layer_enc(K_OUT, 0);
    if (f == 4 * D_ROUNDS + 1)    return layer_enc(K_FIN2, 0);
    return layer_enc(K_ROUND, (f - 4 * D_ROUNDS - 2) % 4);
  endfunction

  // ---- word operations ------------------------------------------------------
  function automatic logic [W-1:0] rotl(input logic [W-1:0] x, input int unsigned r);
    return (x << r) | (x >> (W - r));
  endfunction

  // rotation amounts of one SipRound, in the order they are used below
  function automatic int unsigned rot(input int unsigned n);
    int unsigned r64[6] = '{13, 16, 32, 21, 17, 32};
    int unsigned r32[6] = '{5, 8, 16, 7, 13, 16};
    return (W == 64) ? r64[n] : r32[n];
  endfunction

  function automatic logic [W-1:0] out_word(input logic [3:0][W-1:0] v);
    return (W == 64) ? (v[0] ^ v[1] ^ v[2] ^ v[3]) : (v[1] ^ v[3]);
  endfunction

  function automatic pipe_t apply_layer(input int unsigned code, input pipe_t x);
    pipe_t y;
    int unsigned a;
    y = x;
    a = layer_arg(code);
    case (layer_kind(code))
      K_INIT: begin
        if (W == 64) begin
          y.v[0] = x.v[0] ^ W'(SIP_C0);
          y.v[1] = x.v[1] ^ W'(SIP_C1) ^ (EXTENDED ? W'(8'hee) : W'(0));
          y.v[2] = x.v[2] ^ W'(SIP_C2);
          y.v[3] = x.v[3] ^ W'(SIP_C3);
        end else begin
          y.v[1] = x.v[1] ^ (EXTENDED ? W'(8'hee) : W'(0));
          y.v[2] = x.v[2] ^ W'(HSIP_C2);
          y.v[3] = x.v[3] ^ W'(HSIP_C3);
        end
      end
      K_INJECT: y.v[3] = x.v[3] ^ x.m[W*a +: W];
      K_ABSORB: y.v[0] = x.v[0] ^ x.m[W*a +: W];
      K_ROUND: begin
        case (a)
          0: begin
            y.v[0] = x.v[0] + x.v[1];
            y.v[2] = x.v[2] + x.v[3];
          end
          1: begin
            y.v[1] = rotl(x.v[1], rot(0)) ^ x.v[0];
            y.v[3] = rotl(x.v[3], rot(1)) ^ x.v[2];
            y.v[0] = rotl(x.v[0], rot(2));
          end
          2: begin
            y.v[0] = x.v[0] + x.v[3];
            y.v[2] = x.v[2] + x.v[1];
          end
          default: begin
            y.v[3] = rotl(x.v[3], rot(3)) ^ x.v[0];
            y.v[1] = rotl(x.v[1], rot(4)) ^ x.v[2];
            y.v[2] = rotl(x.v[2], rot(5));
          end
        endcase
      end
      K_FIN1: y.v[2] = x.v[2] ^ (EXTENDED ? W'(8'hee) : W'(8'hff));
      K_FIN2: begin
        y.h0   = out_word(x.v);
        y.v[1] = x.v[1] ^ W'(8'hdd);
      end
      default: y.h1 = out_word(x.v);   // K_OUT
    endcase
    return y;
  endfunction

  // ---- input capture ---------------------------------------------------------
  pipe_t in_pipe;
  always_comb begin
    in_pipe      = '0;
    in_pipe.v[0] = key[W-1:0];
    in_pipe.v[1] = key[2*W-1:W];
    in_pipe.v[2] = key[W-1:0];
    in_pipe.v[3] = key[2*W-1:W];
    in_pipe.m    = (NB*W)'(msg);
    in_pipe.m[NB*W-1 -: 8] = 8'(MSG_BYTES);   // length byte (mod 256) tops the last block
  end

  // ---- the layer chain ---------------------------------------------------------
  // Each layer owns its signals: d_in/d_out around the operation, q/v_q
  // after the optional register. Layer i reads layer i-1's q.
  for (genvar i = 0; i < NL; i++) begin : g_layer
    localparam int unsigned CODE = layer_code(i);
    pipe_t d_in, d_out, q;
    logic  v_in, v_q;

    if (i == 0) begin : g_src
      assign d_in = in_pipe;
      assign v_in = in_valid;
    end else begin : g_src
      assign d_in = g_layer[i-1].q;
      assign v_in = g_layer[i-1].v_q;
    end

    assign d_out = apply_layer(CODE, d_in);

    if (reg_after(i, NL, OPS_PER_STAGE)) begin : g_reg
      always_ff @(posedge clk) q <= d_out;
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) v_q <= 1'b0;
        else        v_q <= v_in;
    end else begin : g_wire
      assign q   = d_out;
      assign v_q = v_in;
    end
  end

  assign out_valid = g_layer[NL-1].v_q;
  assign hash      = EXTENDED ? OUT_W'({g_layer[NL-1].q.h1, g_layer[NL-1].q.h0}) : OUT_W'(g_layer[NL-1].q.h1);

  initial begin
    assert (W == 64 || W == 32) else $error("siphash_core: W must be 64 or 32");
    assert (OPS_PER_STAGE >= 1) else $error("siphash_core: OPS_PER_STAGE must be at least 1");
  end

endmodule
