// tb_fsa_ti_top: end-to-end test of the three shared circuits at their only
// (default) configuration.
//
// All three circuits run at the same time from independent random streams.
// Every output is checked against reference models written here (PRESENT
// S-box table, chi formula, AND of the unshared bits) and against its
// latency (AND 2, PRESENT 3, chi 2 clock edges). The test also makes each
// mechanism of the design happen and counts it; a mechanism that never
// happens is a failure:
//   - back-to-back inputs in every pipeline (one result per cycle);
//   - idle cycles, during which input share registers hold their previous
//     value, followed by a new input (a transition from a held state);
//   - "reset value" pairs: a chosen sharing loaded, then the target input
//     on the next cycle, as in fault-sensitivity profiling;
//   - chi re-masking on (rnd_chi != 0) and off (rnd_chi == 0);
//   - fresh masks: the same unshared input under different sharings;
//   - key-share change between results;
//   - a reset with results in flight, which must be dropped.
module tb_fsa_ti_top;
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

  int checks = 0, failures = 0, cycle = 0;
  int n_b2b_and = 0, n_b2b_pr = 0, n_b2b_kc = 0, n_idle_resume = 0;
  int n_resetval = 0, n_remask_on = 0, n_remask_off = 0, n_fresh_mask = 0;
  int n_key_change = 0, n_flush = 0;
  int n_res_and = 0, n_res_pr = 0, n_res_kc = 0;

  logic       and_q[$];  int and_due[$];
  logic [3:0] pr_q[$];   int pr_due[$];
  logic [4:0] kc_q[$];   int kc_due[$];

  function automatic logic [3:0] sbox(input logic [3:0] v);
    return SBOX[(15 - v) * 4 +: 4];
  endfunction

  function automatic logic [4:0] chi(input logic [4:0] a);
    logic [4:0] r;
    for (int i = 0; i < 5; i++) r[i] = a[i] ^ (~a[(i+1)%5] & a[(i+2)%5]);
    return r;
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  // ---------------- output checkers ----------------
  always @(posedge clk) begin
    if (rst_n && and_out_valid) begin
      checks++; n_res_and++;
      if (and_q.size() == 0) fail("unexpected AND output");
      else begin
        logic e; int d;
        e = and_q.pop_front(); d = and_due.pop_front();
        if ((^and_z_sh) !== e || cycle != d) fail("AND result");
      end
    end
    if (rst_n && pr_out_valid) begin
      checks++; n_res_pr++;
      if (pr_q.size() == 0) fail("unexpected PRESENT output");
      else begin
        logic [3:0] e; int d;
        e = pr_q.pop_front(); d = pr_due.pop_front();
        if ((pr_s_out_sh[0] ^ pr_s_out_sh[1] ^ pr_s_out_sh[2]) !== e
            || pr_ct !== (e ^ pr_k_sh[0] ^ pr_k_sh[1] ^ pr_k_sh[2]) || cycle != d)
          fail("PRESENT result");
      end
    end
    if (rst_n && kc_out_valid) begin
      checks++; n_res_kc++;
      if (kc_q.size() == 0) fail("unexpected chi output");
      else begin
        logic [4:0] e; int d;
        e = kc_q.pop_front(); d = kc_due.pop_front();
        if ((kc_s_out_sh[0] ^ kc_s_out_sh[1] ^ kc_s_out_sh[2]) !== e
            || kc_ct !== (e ^ kc_k_sh[0] ^ kc_k_sh[1] ^ kc_k_sh[2]) || cycle != d)
          fail("chi result");
      end
    end
  end

  // ---------------- stimulus ----------------
  logic and_v_prev = 0, pr_v_prev = 0, kc_v_prev = 0;
  logic [3:0] last_pr_in = 0;
  logic [7:0] last_pr_rnd = 0;

  task automatic drive_cycle(input int n, input bit pr_resetval);
    // AND gate
    and_in_valid = ($urandom_range(0, 3) != 0);
    and_x_sh = 3'($urandom);
    and_y_sh = 3'($urandom);
    if (and_in_valid) begin
      and_q.push_back((^and_x_sh) & (^and_y_sh)); and_due.push_back(cycle + 2);
      if (and_v_prev) n_b2b_and++;
    end
    // PRESENT round
    if (pr_resetval) begin
      pr_in_valid = 1;
      pr_s_in = 4'($urandom);
      pr_rnd  = 8'($urandom);
    end else begin
      pr_in_valid = ($urandom_range(0, 3) != 0);
      // sometimes repeat the previous value under a new mask
      pr_s_in = ($urandom_range(0, 3) == 0) ? last_pr_in : 4'($urandom);
      pr_rnd  = 8'($urandom);
    end
    if (pr_in_valid) begin
      pr_q.push_back(sbox(pr_s_in)); pr_due.push_back(cycle + 3);
      if (pr_v_prev) n_b2b_pr++;
      else if (n > 0) n_idle_resume++;
      if (pr_s_in == last_pr_in && pr_rnd != last_pr_rnd) n_fresh_mask++;
      last_pr_in = pr_s_in; last_pr_rnd = pr_rnd;
    end
    // KECCAK round
    kc_in_valid  = ($urandom_range(0, 3) != 0);
    kc_s_in      = 5'($urandom);
    kc_rnd_share = 10'($urandom);
    kc_rnd_chi   = ($urandom_range(0, 1) != 0) ? 4'($urandom) : 4'd0;
    // rnd_chi acts on the row loaded one cycle earlier
    if (kc_v_prev) begin
      if (kc_rnd_chi != 0) n_remask_on++; else n_remask_off++;
    end
    if (kc_in_valid) begin
      kc_q.push_back(chi(kc_s_in)); kc_due.push_back(cycle + 2);
      if (kc_v_prev) n_b2b_kc++;
    end
    and_v_prev = and_in_valid; pr_v_prev = pr_in_valid; kc_v_prev = kc_in_valid;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      if (n % 200 == 0) begin
        pr_k_sh = 12'($urandom); kc_k_sh = 15'($urandom);
        if (n > 0) n_key_change++;
      end
      // every 50th step: a reset-value pair (two forced back-to-back inputs)
      if (n % 50 == 10) begin
        drive_cycle(n, 1);
        @(negedge clk);
        drive_cycle(n, 1);
        n_resetval++;
      end else begin
        drive_cycle(n, 0);
      end
      @(negedge clk);
    end
    and_in_valid = 0; pr_in_valid = 0; kc_in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (and_q.size() + pr_q.size() + kc_q.size() != 0) fail("results missing");

    // reset with results in flight: everything in the pipelines is dropped
    drive_cycle(1, 1);
    @(negedge clk);
    and_in_valid = 0; pr_in_valid = 0; kc_in_valid = 0;
    rst_n = 0;
    and_q.delete(); and_due.delete(); pr_q.delete(); pr_due.delete();
    kc_q.delete(); kc_due.delete();
    @(negedge clk);
    rst_n = 1;
    repeat (6) @(negedge clk);
    n_flush++;
    checks++;
    if (and_out_valid || pr_out_valid || kc_out_valid) fail("valid after reset");

    // every mechanism must have happened
    checks++; if (n_b2b_and == 0)     fail("no back-to-back AND inputs");
    checks++; if (n_b2b_pr == 0)      fail("no back-to-back PRESENT inputs");
    checks++; if (n_b2b_kc == 0)      fail("no back-to-back chi inputs");
    checks++; if (n_idle_resume == 0) fail("no resume after idle");
    checks++; if (n_resetval == 0)    fail("no reset-value pair");
    checks++; if (n_remask_on == 0)   fail("no re-masking");
    checks++; if (n_remask_off == 0)  fail("no unmasked chi");
    checks++; if (n_fresh_mask == 0)  fail("no fresh mask on repeated input");
    checks++; if (n_key_change == 0)  fail("no key change");
    checks++; if (n_flush == 0)       fail("no reset flush");
    $display("results: and=%0d present=%0d chi=%0d", n_res_and, n_res_pr, n_res_kc);
    $display("mechanisms: b2b and=%0d present=%0d chi=%0d idle_resume=%0d resetval=%0d remask_on=%0d remask_off=%0d fresh_mask=%0d key_change=%0d flush=%0d",
             n_b2b_and, n_b2b_pr, n_b2b_kc, n_idle_resume, n_resetval, n_remask_on,
             n_remask_off, n_fresh_mask, n_key_change, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
