// hash_pkg: constants and helpers shared by the pipelined hash cores.
//
// Every core in this library is written as a straight chain of "layers". A
// layer is one level of dependent word operations (one adder or one XOR deep;
// rotations are wiring and cost nothing). A pipeline register may follow any
// layer: a core with OPS_PER_STAGE = k registers after every k-th layer and
// always after the last one, so k = 1 is the deepest pipeline (a register
// between every pair of dependent operations) and a large k gives a short,
// slow pipeline. The helpers below compute where the registers go and how
// many cycles of latency result. Layer codes pack an operation kind and a
// small argument into one integer so that they can be computed as constants
// at elaboration time.
package hash_pkg;

  // ---- layer code packing ------------------------------------------------
  localparam int unsigned KIND_SHIFT = 16;

  function automatic int unsigned layer_enc(input int unsigned kind, input int unsigned arg);
    return (kind << KIND_SHIFT) | arg;
  endfunction

  function automatic int unsigned layer_kind(input int unsigned code);
    return code >> KIND_SHIFT;
  endfunction

  function automatic int unsigned layer_arg(input int unsigned code);
    return code & ((1 << KIND_SHIFT) - 1);
  endfunction

  // ---- pipeline register placement ---------------------------------------
  // A register follows layer idx (0-based) of a chain of n layers.
  function automatic bit reg_after(input int unsigned idx, input int unsigned n,
                                   input int unsigned ops_per_stage);
    return ((idx + 1) % ops_per_stage == 0) || (idx + 1 == n);
  endfunction

  // Cycles from an accepted input to the matching output.
  function automatic int unsigned pipe_latency(input int unsigned n, input int unsigned ops_per_stage);
    return (n + ops_per_stage - 1) / ops_per_stage;
  endfunction

  // ---- rotations ----------------------------------------------------------
  function automatic logic [63:0] rotl64(input logic [63:0] x, input int unsigned r);
    return (x << r) | (x >> (64 - r));
  endfunction

  function automatic logic [31:0] rotl32(input logic [31:0] x, input int unsigned r);
    return (x << r) | (x >> (32 - r));
  endfunction

  // ---- SipHash initialisation constants ("somepseudorandomlygeneratedbytes")
  localparam logic [63:0] SIP_C0 = 64'h736f6d6570736575;
  localparam logic [63:0] SIP_C1 = 64'h646f72616e646f6d;
  localparam logic [63:0] SIP_C2 = 64'h6c7967656e657261;
  localparam logic [63:0] SIP_C3 = 64'h7465646279746573;
  // HalfSipHash uses 32-bit constants for v2 and v3 only
  localparam logic [31:0] HSIP_C2 = 32'h6c796765;
  localparam logic [31:0] HSIP_C3 = 32'h74656462;

  // ---- SpookyHash ---------------------------------------------------------
  localparam logic [63:0] SPOOKY_CONST = 64'hdeadbeefdeadbeef;

endpackage
