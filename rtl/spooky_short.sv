// spooky_short: fully unrolled, variably pipelined SpookyHash V2 (short form).
//
// SpookyHash "short" hashes messages of up to 191 bytes into 128 bits. Four
// 64-bit words a, b, c, d start as the two seed words and the constant
// 0xdeadbeefdeadbeef. Every complete 32-byte block adds its first two words
// to c, d, runs ShortMix (twelve rotate-add-xor steps) and adds its last two
// words to a, b. A remaining 16-byte half block adds to c, d and is mixed
// too. The last 0..15 bytes, zero-padded, are added to c (bytes 0-7) and d
// (bytes 8-15) together with the length in the top byte of d; with no bytes
// left the constant is added to both instead. ShortEnd (eleven
// xor-rotate-add steps) then gives the hash {b, a}.
//
// MSG_BYTES is fixed when the core is built, so the block structure is known
// at elaboration and the computation unrolls into a chain of layers: one
// add layer per word injection, two layers (add, xor) per ShortMix step and
// two (xor, add) per ShortEnd step. A register follows every
// OPS_PER_STAGE-th layer (see hash_pkg).
//
// Interface: one message per clock on in_valid, no back-pressure. msg byte 0
// is msg[7:0]; seed[63:0] and seed[127:64] are the two seed words;
// hash[63:0] is the first hash word. out_valid/hash follow LATENCY cycles
// after the input. Only the valid flags are reset.
//
// The algorithm choice (short form, 128-bit output, up to 191 bytes) and the
// variable pipelining follow the design's description; the unrolled
// organisation, the layer split and the port conventions are this
// implementation's choices.
module spooky_short
  import hash_pkg::*;
#(
  parameter int unsigned MSG_BYTES     = 64,   // message length, 1..191 bytes
  parameter int unsigned OPS_PER_STAGE = 1     // layers per pipeline stage
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [MSG_BYTES*8-1:0] msg,
  input  logic [127:0]           seed,
  output logic                   out_valid,
  output logic [127:0]           hash
);

  localparam int unsigned NFULL  = MSG_BYTES / 32;               // complete 32-byte blocks
  localparam bit          HALF   = (MSG_BYTES % 32) >= 16;       // a 16-byte half block follows
  localparam int unsigned TAIL_B = MSG_BYTES % 16;               // bytes left for the tail
  localparam int unsigned TAIL_W = 4 * NFULL + (HALF ? 2 : 0);   // first tail word index
  localparam int unsigned NW     = 4 * NFULL + 4;                // 64-bit words of padded message
  localparam int unsigned MIX_L  = 24;                           // ShortMix layers
  localparam int unsigned END_L  = 22;                           // ShortEnd layers
  localparam int unsigned PB     = 2 + MIX_L;                    // layers per full block
  localparam int unsigned NL     = NFULL * PB + (HALF ? 1 + MIX_L : 0) + 1 + END_L;
  localparam int unsigned LATENCY = pipe_latency(NL, OPS_PER_STAGE);

  localparam int unsigned K_ADDCD = 0, K_ADDAB = 1, K_MIX = 2, K_TAIL = 3, K_END = 4;

  // top byte of d carries the length; with no tail bytes the constant is added
  localparam logic [63:0] D_TAIL_CONST = (64'(MSG_BYTES) << 56) + (TAIL_B == 0 ? SPOOKY_CONST : 64'd0);
  localparam logic [63:0] C_TAIL_CONST = (TAIL_B == 0) ? SPOOKY_CONST : 64'd0;

  typedef struct packed {
    logic [3:0][63:0]  h;     // h[0] = a, h[1] = b, h[2] = c, h[3] = d
    logic [NW*64-1:0]  m;     // zero-padded message
  } pipe_t;

  function automatic int unsigned layer_code(input int unsigned idx);
    int unsigned r;
    if (idx < NFULL * PB) begin
      int unsigned o;
      o = idx % PB;
      if (o == 0)      return layer_enc(K_ADDCD, 4 * (idx / PB));
      if (o == PB - 1) return layer_enc(K_ADDAB, 4 * (idx / PB) + 2);
      return layer_enc(K_MIX, o - 1);
    end
    r = idx - NFULL * PB;
    if (HALF) begin
      if (r == 0)     return layer_enc(K_ADDCD, 4 * NFULL);
      if (r <= MIX_L) return layer_enc(K_MIX, r - 1);
      r = r - 1 - MIX_L;
    end
    if (r == 0) return layer_enc(K_TAIL, TAIL_W);
    return layer_enc(K_END, r - 1);
  endfunction

  function automatic int unsigned mix_rot(input int unsigned s);
    int unsigned t[12] = '{50, 52, 30, 41, 54, 48, 38, 37, 62, 34, 5, 36};
    return t[s];
  endfunction

  function automatic int unsigned end_rot(input int unsigned s);
    int unsigned t[11] = '{15, 52, 26, 51, 28, 9, 47, 54, 32, 25, 63};
    return t[s];
  endfunction

  function automatic pipe_t apply_layer(input int unsigned code, input pipe_t x);
    pipe_t y;
    int unsigned a, s, hx, hy, hz;
    y = x;
    a = layer_arg(code);
    s = a / 2;
    case (layer_kind(code))
      K_ADDCD: begin
        y.h[2] = x.h[2] + x.m[64*a +: 64];
        y.h[3] = x.h[3] + x.m[64*(a+1) +: 64];
      end
      K_ADDAB: begin
        y.h[0] = x.h[0] + x.m[64*a +: 64];
        y.h[1] = x.h[1] + x.m[64*(a+1) +: 64];
      end
      K_MIX: begin
        // step s: h[x] = rot(h[x]) + h[y]; then h[z] ^= h[x]
        hx = (s + 2) % 4;
        hy = (s + 3) % 4;
        hz = s % 4;
        if (a % 2 == 0) y.h[hx] = rotl64(x.h[hx], mix_rot(s)) + x.h[hy];
        else            y.h[hz] = x.h[hz] ^ x.h[hx];
      end
      K_TAIL: begin
        y.h[2] = x.h[2] + x.m[64*a +: 64] + C_TAIL_CONST;
        y.h[3] = x.h[3] + x.m[64*(a+1) +: 64] + D_TAIL_CONST;
      end
      default: begin   // K_END
        // step s: h[z] ^= h[y]; then h[y] = rot(h[y]); h[z] += h[y]
        hy = (s + 2) % 4;
        hz = (s + 3) % 4;
        if (a % 2 == 0) y.h[hz] = x.h[hz] ^ x.h[hy];
        else begin
          y.h[hy] = rotl64(x.h[hy], end_rot(s));
          y.h[hz] = x.h[hz] + rotl64(x.h[hy], end_rot(s));
        end
      end
    endcase
    return y;
  endfunction

  pipe_t in_pipe;
  always_comb begin
    in_pipe      = '0;
    in_pipe.h[0] = seed[63:0];
    in_pipe.h[1] = seed[127:64];
    in_pipe.h[2] = SPOOKY_CONST;
    in_pipe.h[3] = SPOOKY_CONST;
    in_pipe.m    = (NW*64)'(msg);
  end

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
  assign hash      = {g_layer[NL-1].q.h[1], g_layer[NL-1].q.h[0]};

  initial begin
    assert (MSG_BYTES >= 1 && MSG_BYTES <= 191)
      else $error("spooky_short: MSG_BYTES must be 1..191 (short form)");
    assert (OPS_PER_STAGE >= 1) else $error("spooky_short: OPS_PER_STAGE must be at least 1");
  end

endmodule
