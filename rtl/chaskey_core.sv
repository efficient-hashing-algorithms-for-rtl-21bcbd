// chaskey_core: fully unrolled, variably pipelined Chaskey MAC, 128-bit tag.
//
// Chaskey keeps a 128-bit state of four 32-bit words. The state starts as
// the key K; each 16-byte message block is XORed into it and followed by the
// permutation (ROUNDS ARX rounds). The last block is first XORed with a
// subkey: K1 = 2K in GF(2^128) if the block is complete, otherwise the block
// is padded with a 01 byte and zeros and K2 = 4K is used. After the last
// permutation the same subkey is XORed in again and the whole state is the
// tag. An empty message is one padded block.
//
// As in siphash_core, MSG_BYTES is fixed when the core is built and the
// whole computation unrolls into a chain of layers: one XOR layer per block
// (the last one also folds in the subkey), four layers per round (add,
// rotate-xor, add, rotate-xor), and the closing subkey XOR. A register
// follows every OPS_PER_STAGE-th layer (see hash_pkg). The subkey itself
// (a 1-bit shift with a conditional XOR of 0x87, twice) is formed from the
// key before the first layer.
//
// Interface: one message per clock on in_valid, no back-pressure. msg byte 0
// is msg[7:0]; key byte 0 is key[7:0]; tag byte 0 is tag[7:0] (the words
// v0..v3 little-endian, as in the reference software). out_valid/tag follow
// LATENCY cycles after the input. Only the valid flags are reset.
//
// The 32-bit ARX state, the full-state 128-bit output and the 12-round
// default follow the design's description; the unrolled organisation, the
// layer split and the port conventions are this implementation's choices.
module chaskey_core
  import hash_pkg::*;
#(
  parameter int unsigned ROUNDS        = 12,   // permutation rounds
  parameter int unsigned MSG_BYTES     = 64,   // message length in bytes
  parameter int unsigned OPS_PER_STAGE = 1     // layers per pipeline stage
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [MSG_BYTES*8-1:0] msg,
  input  logic [127:0]           key,
  output logic                   out_valid,
  output logic [127:0]           tag
);

  localparam bit          COMPLETE = (MSG_BYTES > 0) && (MSG_BYTES % 16 == 0);
  localparam int unsigned NB       = (MSG_BYTES == 0) ? 1 : (MSG_BYTES + 15) / 16;
  localparam int unsigned PB       = 1 + 4 * ROUNDS;      // layers per block
  localparam int unsigned NL       = NB * PB + 1;         // total layers
  localparam int unsigned LATENCY  = pipe_latency(NL, OPS_PER_STAGE);

  localparam int unsigned K_XOR = 0, K_ROUND = 1, K_FINAL = 2;

  typedef struct packed {
    logic [3:0][31:0] v;      // state words v[0]..v[3]
    logic [127:0]     kx;     // subkey of the last block
    logic [NB*128-1:0] m;     // padded message
  } pipe_t;

  function automatic int unsigned layer_code(input int unsigned idx);
    if (idx == NL - 1) return layer_enc(K_FINAL, 0);
    if (idx % PB == 0) return layer_enc(K_XOR, idx / PB);
    return layer_enc(K_ROUND, (idx % PB - 1) % 4);
  endfunction

  function automatic logic [127:0] times2(input logic [127:0] k);
    return {k[126:0], 1'b0} ^ {120'd0, k[127] ? 8'h87 : 8'h00};
  endfunction

  function automatic pipe_t apply_layer(input int unsigned code, input pipe_t x);
    pipe_t y;
    int unsigned a;
    logic [127:0] blk;
    y = x;
    a = layer_arg(code);
    case (layer_kind(code))
      K_XOR: begin
        blk = x.m[128*a +: 128];
        if (a == NB - 1) blk = blk ^ x.kx;
        y.v = x.v ^ blk;
      end
      K_ROUND: begin
        case (a)
          0: begin
            y.v[0] = x.v[0] + x.v[1];
            y.v[2] = x.v[2] + x.v[3];
          end
          1: begin
            y.v[1] = rotl32(x.v[1], 5) ^ x.v[0];
            y.v[3] = rotl32(x.v[3], 8) ^ x.v[2];
            y.v[0] = rotl32(x.v[0], 16);
          end
          2: begin
            y.v[0] = x.v[0] + x.v[3];
            y.v[2] = x.v[2] + x.v[1];
          end
          default: begin
            y.v[3] = rotl32(x.v[3], 13) ^ x.v[0];
            y.v[1] = rotl32(x.v[1], 7) ^ x.v[2];
            y.v[2] = rotl32(x.v[2], 16);
          end
        endcase
      end
      default: y.v = x.v ^ x.kx;   // K_FINAL
    endcase
    return y;
  endfunction

  // ---- input capture: state = K, subkey, padded message ----------------------
  pipe_t in_pipe;
  always_comb begin
    logic [127:0] k1;
    k1         = times2(key);
    in_pipe    = '0;
    in_pipe.v  = key;
    in_pipe.kx = COMPLETE ? k1 : times2(k1);
    // the 01 padding byte sits right after the last message byte; for a
    // complete last block it falls outside the padded message and is dropped
    in_pipe.m  = (NB*128)'({COMPLETE ? 8'h00 : 8'h01, msg});
  end

  // ---- the layer chain -----------------------------------------------------------
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
  assign tag       = g_layer[NL-1].q.v;

  initial assert (OPS_PER_STAGE >= 1) else $error("chaskey_core: OPS_PER_STAGE must be at least 1");

endmodule
