// tb_keccak_profiling: random transition sweep of the shared KECCAK chi
// round with the re-masking bits fixed to zero (non-uniform output
// sharing), the data set of a fault-sensitivity profiling of chi.
//
// 2^24 random transitions of the 15-bit input share register are applied as
// one back-to-back stream of 2^24 + 1 random sharings (each consecutive
// pair is one transition), with rnd_chi = 0. The sharing is set exactly
// through the randomness port: shares 1 and 2 are the random words, share 3
// follows from s_in. Every result is checked (ct = chi(s_in) ^ K,
// latency 2). Then the key-recovery data set: all 32 rows under one fixed
// key, with fresh re-masking bits this time. +transitions=N shortens the
// sweep for quick runs.
module tb_keccak_profiling;
  import ti_pkg::*;

  logic clk = 0, rst_n = 0;
  logic and_in_valid = 0, and_out_valid;
  logic [2:0] and_x_sh = 0, and_y_sh = 0, and_z_sh;
  logic pr_in_valid = 0, pr_out_valid;
  logic [3:0] pr_s_in = 0, pr_ct;
  logic [7:0] pr_rnd = 0;
  present_sh_t pr_k_sh = '0, pr_s_out_sh;
  logic kc_in_valid = 0, kc_out_valid;
  logic [4:0] kc_s_in = 0, kc_ct;
  logic [9:0] kc_rnd_share = 0;
  logic [3:0] kc_rnd_chi = 0;
  keccak_sh_t kc_k_sh = '0, kc_s_out_sh;

  fsa_ti_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0, n_res = 0, n_in = 0;
  longint n_trans = 64'd1 << 24;
  logic [4:0] exp_q[$];
  longint due_q[$];

  function automatic logic [4:0] chi(input logic [4:0] a);
    logic [4:0] r;
    for (int i = 0; i < 5; i++) r[i] = a[i] ^ (~a[(i+1)%5] & a[(i+2)%5]);
    return r;
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && kc_out_valid) begin
      logic [4:0] e;
      longint d;
      n_res++;
      e = exp_q.pop_front();
      d = due_q.pop_front();
      if (kc_ct !== (e ^ kc_k_sh[0] ^ kc_k_sh[1] ^ kc_k_sh[2]) || cycle != d) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: ct=%h expected %h", cycle, kc_ct, e);
      end
    end
  end

  task automatic load(input logic [14:0] sh, input logic [3:0] r);
    // sh = {share1, share2, share3}; r acts one cycle later, on this row
    kc_in_valid  = 1;
    kc_rnd_share = {sh[9:5], sh[14:10]};
    kc_s_in      = sh[14:10] ^ sh[9:5] ^ sh[4:0];
    exp_q.push_back(chi(kc_s_in));
    due_q.push_back(cycle + 2);
    n_in++;
    @(negedge clk);
    kc_rnd_chi = r;
  endtask

  initial begin
    void'($value$plusargs("transitions=%d", n_trans));
    kc_k_sh = 15'h2C71;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (longint n = 0; n <= n_trans; n++) load(15'($urandom), 4'd0);
    for (int p = 0; p < 32; p++) begin
      logic [4:0] m1, m2;
      m1 = 5'($urandom); m2 = 5'($urandom);
      load({m1, m2, 5'(p) ^ m1 ^ m2}, 4'($urandom));
    end
    kc_in_valid = 0;
    repeat (6) @(negedge clk);
    checks = int'(n_res);
    checks++;
    if (n_res != n_in || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results of %0d inputs", n_res, n_in);
    end
    $display("random transitions applied: %0d", n_trans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
