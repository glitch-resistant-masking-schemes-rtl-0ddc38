// tb_present_profiling: exhaustive transition sweep of the shared PRESENT
// round, the data set of a fault-sensitivity profiling of the first S-box
// stage.
//
// For every one of the 4096 values ("reset values") r of the 12-bit input
// share register and every one of the 4096 target values t, the register is
// loaded with r and on the next cycle with t, so the stage-F logic sees the
// transition r -> t; 2^24 transitions, 2^25 back-to-back inputs. The
// sharing is chosen exactly through the randomness port: shares 1 and 2
// are the random nibbles, share 3 follows from s_in. Every result is checked
// (ct = S(s_in) ^ K, latency 3) and the number of distinct transitions seen
// by the share register is counted. A plusarg +reset_values=N limits the
// sweep to the first N reset values for quick runs.
// Afterwards the key-recovery data set is produced: all 16 inputs under one
// fixed key, every ciphertext checked.
module tb_present_profiling;
  import ti_pkg::*;

  localparam logic [63:0] SBOX = 64'hC56B90AD3EF84712;

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
  longint cycle = 0, n_trans = 0, n_res = 0;
  int n_resets = 4096;
  logic [3:0] exp_q[$];
  longint due_q[$];
  // previous content of the share register, to count transitions
  logic [11:0] reg_prev;
  bit reg_prev_ok = 0;

  function automatic logic [3:0] sbox(input logic [3:0] v);
    return SBOX[(15 - v) * 4 +: 4];
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && pr_out_valid) begin
      logic [3:0] e;
      longint d;
      n_res++;
      e = exp_q.pop_front();
      d = due_q.pop_front();
      if (pr_ct !== (e ^ pr_k_sh[0] ^ pr_k_sh[1] ^ pr_k_sh[2]) || cycle != d) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: ct=%h expected %h", cycle, pr_ct, e);
      end
    end
  end

  task automatic load(input logic [11:0] sh);
    // sh = {share1, share2, share3}
    pr_in_valid = 1;
    pr_rnd      = {sh[7:4], sh[11:8]};
    pr_s_in     = sh[11:8] ^ sh[7:4] ^ sh[3:0];
    exp_q.push_back(sbox(pr_s_in));
    due_q.push_back(cycle + 3);
    if (reg_prev_ok) n_trans++;
    reg_prev = sh;
    reg_prev_ok = 1;
    @(negedge clk);
  endtask

  initial begin
    void'($value$plusargs("reset_values=%d", n_resets));
    pr_k_sh = 12'h5A3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < n_resets; r++) begin
      for (int t = 0; t < 4096; t++) begin
        load(12'(r));
        load(12'(t));
      end
    end
    // key recovery set: all 16 plaintexts under a fixed key, fresh masks
    for (int p = 0; p < 16; p++) begin
      logic [3:0] m1, m2;
      m1 = 4'($urandom); m2 = 4'($urandom);
      load({m1, m2, 4'(p) ^ m1 ^ m2});
    end
    pr_in_valid = 0;
    repeat (6) @(negedge clk);
    checks = int'(n_res);
    checks++;
    if (n_res != 2 * 4096 * longint'(n_resets) + 16 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results, %0d missing", n_res, exp_q.size());
    end
    $display("transitions into the share register: %0d (reset value -> target pairs: %0d)",
             n_trans, 4096 * longint'(n_resets));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
