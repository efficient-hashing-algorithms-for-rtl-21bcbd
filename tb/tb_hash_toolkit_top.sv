// tb_hash_toolkit_top: end-to-end test of hash_toolkit_top with 8-byte
// messages (the default 64-byte build makes a very large simulation model)
// and otherwise default parameters: one dependent operation per pipeline
// stage, SipHash-4-8, Chaskey with 12 rounds. All six cores are fed at the same
// time with independent random messages and keys; each core sees runs of
// back-to-back messages (one per clock, the cores' full rate) and idle
// cycles. Every output is compared with the sequential reference models and
// its latency with the layer count of the core. The test counts, per core,
// the outputs, back-to-back inputs and idle gaps, and counts a failure for
// any of these that never happened.
module tb_hash_toolkit_top;
  import hash_ref_pkg::*;

  localparam int MSG    = 8;
  localparam int N_MSG  = 40;
  localparam int NCORE  = 6;
  localparam int LAT_SPOOKY = (MSG/32)*26 + ((MSG%32)>=16 ? 25 : 0) + 1 + 22;
  localparam int LAT_SIP = 1 + (MSG/8+1)*18 + 2 + 32;
  localparam int LAT_SIPX = 1 + (MSG/8+1)*18 + 2 + 32 + 33;
  localparam int LAT_HSIP = 1 + (MSG/4+1)*18 + 2 + 32;
  localparam int LAT_HSIPX = 1 + (MSG/4+1)*18 + 2 + 32 + 33;
  localparam int LAT_CHASKEY = ((MSG+15)/16)*49 + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           spooky_in_valid, spooky_out_valid;
  logic [MSG*8-1:0] spooky_msg;
  logic [127:0] spooky_key;
  logic [127:0] spooky_out;
  logic [127:0] spooky_exp_q [$];
  int             spooky_t_q [$];
  logic           sip_in_valid, sip_out_valid;
  logic [MSG*8-1:0] sip_msg;
  logic [127:0] sip_key;
  logic [63:0] sip_out;
  logic [63:0] sip_exp_q [$];
  int             sip_t_q [$];
  logic           sipx_in_valid, sipx_out_valid;
  logic [MSG*8-1:0] sipx_msg;
  logic [127:0] sipx_key;
  logic [127:0] sipx_out;
  logic [127:0] sipx_exp_q [$];
  int             sipx_t_q [$];
  logic           hsip_in_valid, hsip_out_valid;
  logic [MSG*8-1:0] hsip_msg;
  logic [63:0] hsip_key;
  logic [31:0] hsip_out;
  logic [31:0] hsip_exp_q [$];
  int             hsip_t_q [$];
  logic           hsipx_in_valid, hsipx_out_valid;
  logic [MSG*8-1:0] hsipx_msg;
  logic [63:0] hsipx_key;
  logic [63:0] hsipx_out;
  logic [63:0] hsipx_exp_q [$];
  int             hsipx_t_q [$];
  logic           chaskey_in_valid, chaskey_out_valid;
  logic [MSG*8-1:0] chaskey_msg;
  logic [127:0] chaskey_key;
  logic [127:0] chaskey_out;
  logic [127:0] chaskey_exp_q [$];
  int             chaskey_t_q [$];

  hash_toolkit_top #(.MSG_BYTES(MSG)) dut (
    .clk, .rst_n,
    .spooky_in_valid, .spooky_msg, .spooky_seed(spooky_key), .spooky_out_valid, .spooky_hash(spooky_out),
    .sip_in_valid, .sip_msg, .sip_key(sip_key), .sip_out_valid, .sip_hash(sip_out),
    .sipx_in_valid, .sipx_msg, .sipx_key(sipx_key), .sipx_out_valid, .sipx_hash(sipx_out),
    .hsip_in_valid, .hsip_msg, .hsip_key(hsip_key), .hsip_out_valid, .hsip_hash(hsip_out),
    .hsipx_in_valid, .hsipx_msg, .hsipx_key(hsipx_key), .hsipx_out_valid, .hsipx_hash(hsipx_out),
    .chaskey_in_valid, .chaskey_msg, .chaskey_key(chaskey_key), .chaskey_out_valid, .chaskey_tag(chaskey_out));

  int checks = 0, failures = 0;
  int cycle = 0;
  int sent [NCORE], got [NCORE], back_to_back [NCORE], bubbles [NCORE];
  bit prev_valid [NCORE];
  string names [NCORE] = '{"spooky", "sip", "sipx", "hsip", "hsipx", "chaskey"};

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [MSG*8-1:0] pack(input bytes_t m);
    logic [MSG*8-1:0] r;
    for (int j = 0; j < MSG; j++) r[8*j +: 8] = m[j];
    return r;
  endfunction

  function automatic void rand_msg(output bytes_t m, output logic [127:0] k);
    m = {};
    for (int j = 0; j < MSG; j++) m.push_back(8'($urandom));
    for (int j = 0; j < 4; j++) k[32*j +: 32] = $urandom;
  endfunction

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    bytes_t m;
    logic [127:0] k;
    spooky_in_valid = 1'b0; sip_in_valid = 1'b0; sipx_in_valid = 1'b0;
    hsip_in_valid = 1'b0; hsipx_in_valid = 1'b0; chaskey_in_valid = 1'b0;
    for (int i = 0; i < NCORE; i++) begin
      sent[i] = 0; got[i] = 0; back_to_back[i] = 0; bubbles[i] = 0; prev_valid[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < N_MSG; c++) begin
      // spooky
      if (c > 0 && $urandom_range(3) == 0) begin
        spooky_in_valid <= 1'b0;
        prev_valid[0] = 1'b0;
      end
      else begin
        rand_msg(m, k);
        spooky_msg <= pack(m);
        spooky_key <= k[127:0];
        spooky_in_valid <= 1'b1;
        spooky_exp_q.push_back(128'(spooky_short_ref(m, k)));
        spooky_t_q.push_back(cycle);
        sent[0]++;
        if (prev_valid[0]) back_to_back[0]++;
        else if (sent[0] > 1) bubbles[0]++;
        prev_valid[0] = 1'b1;
      end

      // sip
      if (c > 0 && $urandom_range(3) == 0) begin
        sip_in_valid <= 1'b0;
        prev_valid[1] = 1'b0;
      end
      else begin
        rand_msg(m, k);
        sip_msg <= pack(m);
        sip_key <= k[127:0];
        sip_in_valid <= 1'b1;
        sip_exp_q.push_back(64'(siphash_ref(64, 0, 4, 8, m, k)));
        sip_t_q.push_back(cycle);
        sent[1]++;
        if (prev_valid[1]) back_to_back[1]++;
        else if (sent[1] > 1) bubbles[1]++;
        prev_valid[1] = 1'b1;
      end

      // sipx
      if (c > 0 && $urandom_range(3) == 0) begin
        sipx_in_valid <= 1'b0;
        prev_valid[2] = 1'b0;
      end
      else begin
        rand_msg(m, k);
        sipx_msg <= pack(m);
        sipx_key <= k[127:0];
        sipx_in_valid <= 1'b1;
        sipx_exp_q.push_back(128'(siphash_ref(64, 1, 4, 8, m, k)));
        sipx_t_q.push_back(cycle);
        sent[2]++;
        if (prev_valid[2]) back_to_back[2]++;
        else if (sent[2] > 1) bubbles[2]++;
        prev_valid[2] = 1'b1;
      end

      // hsip
      if (c > 0 && $urandom_range(3) == 0) begin
        hsip_in_valid <= 1'b0;
        prev_valid[3] = 1'b0;
      end
      else begin
        rand_msg(m, k);
        k[127:64] = '0;   // 64-bit key
        hsip_msg <= pack(m);
        hsip_key <= k[63:0];
        hsip_in_valid <= 1'b1;
        hsip_exp_q.push_back(32'(siphash_ref(32, 0, 4, 8, m, k)));
        hsip_t_q.push_back(cycle);
        sent[3]++;
        if (prev_valid[3]) back_to_back[3]++;
        else if (sent[3] > 1) bubbles[3]++;
        prev_valid[3] = 1'b1;
      end

      // hsipx
      if (c > 0 && $urandom_range(3) == 0) begin
        hsipx_in_valid <= 1'b0;
        prev_valid[4] = 1'b0;
      end
      else begin
        rand_msg(m, k);
        k[127:64] = '0;   // 64-bit key
        hsipx_msg <= pack(m);
        hsipx_key <= k[63:0];
        hsipx_in_valid <= 1'b1;
        hsipx_exp_q.push_back(64'(siphash_ref(32, 1, 4, 8, m, k)));
        hsipx_t_q.push_back(cycle);
        sent[4]++;
        if (prev_valid[4]) back_to_back[4]++;
        else if (sent[4] > 1) bubbles[4]++;
        prev_valid[4] = 1'b1;
      end

      // chaskey
      if (c > 0 && $urandom_range(3) == 0) begin
        chaskey_in_valid <= 1'b0;
        prev_valid[5] = 1'b0;
      end
      else begin
        rand_msg(m, k);
        chaskey_msg <= pack(m);
        chaskey_key <= k[127:0];
        chaskey_in_valid <= 1'b1;
        chaskey_exp_q.push_back(128'(chaskey_ref(12, m, k)));
        chaskey_t_q.push_back(cycle);
        sent[5]++;
        if (prev_valid[5]) back_to_back[5]++;
        else if (sent[5] > 1) bubbles[5]++;
        prev_valid[5] = 1'b1;
      end

      @(posedge clk);
    end
    spooky_in_valid <= 1'b0; sip_in_valid <= 1'b0; sipx_in_valid <= 1'b0; hsip_in_valid <= 1'b0; hsipx_in_valid <= 1'b0; chaskey_in_valid <= 1'b0;
    wait (got[0] == sent[0] && got[1] == sent[1] && got[2] == sent[2] && got[3] == sent[3] && got[4] == sent[4] && got[5] == sent[5]);
    @(posedge clk);
    for (int i = 0; i < NCORE; i++) begin
      $display("%-8s outputs=%0d back_to_back=%0d idle_gaps=%0d", names[i], got[i], back_to_back[i], bubbles[i]);
      checks += 3;
      if (got[i] == 0)          begin failures++; $display("%s: no output", names[i]); end
      if (back_to_back[i] == 0) begin failures++; $display("%s: no back-to-back inputs", names[i]); end
      if (bubbles[i] == 0)      begin failures++; $display("%s: no idle gap", names[i]); end
    end
    finish();
  end

  always @(posedge clk) begin
    if (rst_n && spooky_out_valid) begin
      if (spooky_exp_q.size() == 0) begin failures++; $display("spooky: output with nothing pending"); end
      else begin
        logic [127:0] e;
        int t0;
        e = spooky_exp_q.pop_front();
        t0 = spooky_t_q.pop_front();
        checks += 2;
        got[0]++;
        if (spooky_out !== e) begin failures++; $display("spooky: got %h expected %h", spooky_out, e); end
        if (cycle - t0 - 1 != LAT_SPOOKY) begin
          failures++; $display("spooky: latency %0d expected %0d", cycle - t0 - 1, LAT_SPOOKY);
        end
      end
    end
    if (rst_n && sip_out_valid) begin
      if (sip_exp_q.size() == 0) begin failures++; $display("sip: output with nothing pending"); end
      else begin
        logic [63:0] e;
        int t0;
        e = sip_exp_q.pop_front();
        t0 = sip_t_q.pop_front();
        checks += 2;
        got[1]++;
        if (sip_out !== e) begin failures++; $display("sip: got %h expected %h", sip_out, e); end
        if (cycle - t0 - 1 != LAT_SIP) begin
          failures++; $display("sip: latency %0d expected %0d", cycle - t0 - 1, LAT_SIP);
        end
      end
    end
    if (rst_n && sipx_out_valid) begin
      if (sipx_exp_q.size() == 0) begin failures++; $display("sipx: output with nothing pending"); end
      else begin
        logic [127:0] e;
        int t0;
        e = sipx_exp_q.pop_front();
        t0 = sipx_t_q.pop_front();
        checks += 2;
        got[2]++;
        if (sipx_out !== e) begin failures++; $display("sipx: got %h expected %h", sipx_out, e); end
        if (cycle - t0 - 1 != LAT_SIPX) begin
          failures++; $display("sipx: latency %0d expected %0d", cycle - t0 - 1, LAT_SIPX);
        end
      end
    end
    if (rst_n && hsip_out_valid) begin
      if (hsip_exp_q.size() == 0) begin failures++; $display("hsip: output with nothing pending"); end
      else begin
        logic [31:0] e;
        int t0;
        e = hsip_exp_q.pop_front();
        t0 = hsip_t_q.pop_front();
        checks += 2;
        got[3]++;
        if (hsip_out !== e) begin failures++; $display("hsip: got %h expected %h", hsip_out, e); end
        if (cycle - t0 - 1 != LAT_HSIP) begin
          failures++; $display("hsip: latency %0d expected %0d", cycle - t0 - 1, LAT_HSIP);
        end
      end
    end
    if (rst_n && hsipx_out_valid) begin
      if (hsipx_exp_q.size() == 0) begin failures++; $display("hsipx: output with nothing pending"); end
      else begin
        logic [63:0] e;
        int t0;
        e = hsipx_exp_q.pop_front();
        t0 = hsipx_t_q.pop_front();
        checks += 2;
        got[4]++;
        if (hsipx_out !== e) begin failures++; $display("hsipx: got %h expected %h", hsipx_out, e); end
        if (cycle - t0 - 1 != LAT_HSIPX) begin
          failures++; $display("hsipx: latency %0d expected %0d", cycle - t0 - 1, LAT_HSIPX);
        end
      end
    end
    if (rst_n && chaskey_out_valid) begin
      if (chaskey_exp_q.size() == 0) begin failures++; $display("chaskey: output with nothing pending"); end
      else begin
        logic [127:0] e;
        int t0;
        e = chaskey_exp_q.pop_front();
        t0 = chaskey_t_q.pop_front();
        checks += 2;
        got[5]++;
        if (chaskey_out !== e) begin failures++; $display("chaskey: got %h expected %h", chaskey_out, e); end
        if (cycle - t0 - 1 != LAT_CHASKEY) begin
          failures++; $display("chaskey: latency %0d expected %0d", cycle - t0 - 1, LAT_CHASKEY);
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end
endmodule
