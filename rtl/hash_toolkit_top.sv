// hash_toolkit_top: the hash-core library assembled side by side.
//
// The library offers one hardware hash per kind of requirement: SpookyHash
// (short form, 128-bit, non-cryptographic, the fastest), SipHash in four
// variants (64-bit and 32-bit state, each with a plain and an extended
// output) and Chaskey (32-bit ARX MAC with a 128-bit tag). Each core is a
// fully unrolled pipeline that accepts one message per clock and delivers
// its hash a fixed number of cycles later; see the cores for their layer
// structure. The cores are independent, so each has its own input and output
// ports here: a system normally instantiates just the one it needs.
//
// Parameters set every core at once: MSG_BYTES, the message length (up to
// 191 for SpookyHash), OPS_PER_STAGE, the number of dependent operations
// between pipeline registers (1 = deepest pipeline), and the SipHash and
// Chaskey round counts (defaults SipHash-4-8, Chaskey 12 rounds).
module hash_toolkit_top #(
  parameter int unsigned MSG_BYTES      = 64,
  parameter int unsigned OPS_PER_STAGE  = 1,
  parameter int unsigned SIP_C_ROUNDS   = 4,
  parameter int unsigned SIP_D_ROUNDS   = 8,
  parameter int unsigned CHASKEY_ROUNDS = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // SpookyHash short, 128-bit hash
  input  logic                   spooky_in_valid,
  input  logic [MSG_BYTES*8-1:0] spooky_msg,
  input  logic [127:0]           spooky_seed,
  output logic                   spooky_out_valid,
  output logic [127:0]           spooky_hash,
  // SipHash, 64-bit state, 64-bit hash
  input  logic                   sip_in_valid,
  input  logic [MSG_BYTES*8-1:0] sip_msg,
  input  logic [127:0]           sip_key,
  output logic                   sip_out_valid,
  output logic [63:0]            sip_hash,
  // extended SipHash, 128-bit hash
  input  logic                   sipx_in_valid,
  input  logic [MSG_BYTES*8-1:0] sipx_msg,
  input  logic [127:0]           sipx_key,
  output logic                   sipx_out_valid,
  output logic [127:0]           sipx_hash,
  // HalfSipHash, 32-bit state, 32-bit hash
  input  logic                   hsip_in_valid,
  input  logic [MSG_BYTES*8-1:0] hsip_msg,
  input  logic [63:0]            hsip_key,
  output logic                   hsip_out_valid,
  output logic [31:0]            hsip_hash,
  // extended HalfSipHash, 64-bit hash
  input  logic                   hsipx_in_valid,
  input  logic [MSG_BYTES*8-1:0] hsipx_msg,
  input  logic [63:0]            hsipx_key,
  output logic                   hsipx_out_valid,
  output logic [63:0]            hsipx_hash,
  // Chaskey, 128-bit tag
  input  logic                   chaskey_in_valid,
  input  logic [MSG_BYTES*8-1:0] chaskey_msg,
  input  logic [127:0]           chaskey_key,
  output logic                   chaskey_out_valid,
  output logic [127:0]           chaskey_tag
);

  spooky_short #(.MSG_BYTES(MSG_BYTES), .OPS_PER_STAGE(OPS_PER_STAGE)) u_spooky (
    .clk, .rst_n, .in_valid(spooky_in_valid), .msg(spooky_msg), .seed(spooky_seed),
    .out_valid(spooky_out_valid), .hash(spooky_hash));

  siphash_core #(.W(64), .EXTENDED(1'b0), .C_ROUNDS(SIP_C_ROUNDS), .D_ROUNDS(SIP_D_ROUNDS),
                 .MSG_BYTES(MSG_BYTES), .OPS_PER_STAGE(OPS_PER_STAGE)) u_sip (
    .clk, .rst_n, .in_valid(sip_in_valid), .msg(sip_msg), .key(sip_key),
    .out_valid(sip_out_valid), .hash(sip_hash));

  siphash_core #(.W(64), .EXTENDED(1'b1), .C_ROUNDS(SIP_C_ROUNDS), .D_ROUNDS(SIP_D_ROUNDS),
                 .MSG_BYTES(MSG_BYTES), .OPS_PER_STAGE(OPS_PER_STAGE)) u_sipx (
    .clk, .rst_n, .in_valid(sipx_in_valid), .msg(sipx_msg), .key(sipx_key),
    .out_valid(sipx_out_valid), .hash(sipx_hash));

  siphash_core #(.W(32), .EXTENDED(1'b0), .C_ROUNDS(SIP_C_ROUNDS), .D_ROUNDS(SIP_D_ROUNDS),
                 .MSG_BYTES(MSG_BYTES), .OPS_PER_STAGE(OPS_PER_STAGE)) u_hsip (
    .clk, .rst_n, .in_valid(hsip_in_valid), .msg(hsip_msg), .key(hsip_key),
    .out_valid(hsip_out_valid), .hash(hsip_hash));

  siphash_core #(.W(32), .EXTENDED(1'b1), .C_ROUNDS(SIP_C_ROUNDS), .D_ROUNDS(SIP_D_ROUNDS),
                 .MSG_BYTES(MSG_BYTES), .OPS_PER_STAGE(OPS_PER_STAGE)) u_hsipx (
    .clk, .rst_n, .in_valid(hsipx_in_valid), .msg(hsipx_msg), .key(hsipx_key),
    .out_valid(hsipx_out_valid), .hash(hsipx_hash));

  chaskey_core #(.ROUNDS(CHASKEY_ROUNDS), .MSG_BYTES(MSG_BYTES), .OPS_PER_STAGE(OPS_PER_STAGE)) u_chaskey (
    .clk, .rst_n, .in_valid(chaskey_in_valid), .msg(chaskey_msg), .key(chaskey_key),
    .out_valid(chaskey_out_valid), .tag(chaskey_tag));

endmodule
