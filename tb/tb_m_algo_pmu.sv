// tb_m_algo_pmu: end-to-end test of the M-algorithm path metric updating
// unit at its default size (M = 16 survivors, 256-state trellis).
//
// The testbench drives four phases: symbols produced by encoding random bits
// with the trellis labels and no noise, the same with noise, uniformly random
// symbols, and a restart with the start input in the middle; sym_valid is
// dropped at random to stall the unit. After every accepted symbol it
// recomputes the step from the survivors the unit held before it (all 2M
// extensions, best metric per state, M smallest metrics) and checks the new
// survivor list: count, ascending state order, each metric equal to the best
// metric of its state minus the step minimum, a decision bit of a matching
// extension, the metric multiset, step_min, merge_cnt and c1_cnt, and the
// one-cycle latency of out_valid. In the noise-free phase it also checks that
// the encoder's own state survives with metric 0 whenever at most M states
// have distortion 0. Each mechanism (merged path rejection, a partly filled
// list, survivors from both sets, metric normalisation, stalls, restart)
// must occur at least once.
module tb_m_algo_pmu;
  import mpath_pkg::*;

  localparam int M = 16;
  localparam int NSTEPS = 1600;

  logic clk = 0, rst_n = 0, start = 0, sym_valid = 0;
  logic signed [SYMW-1:0] sym = '0;
  logic out_valid;
  logic surv_valid [M];
  logic [SW-1:0] surv_state [M];
  logic surv_dec [M];
  logic [MW-1:0] surv_metric [M];
  logic [MW-1:0] step_min;
  logic [$clog2(2*M+1)-1:0] merge_cnt;
  logic [$clog2(M+1)-1:0] c1_cnt;
  logic best_found;
  logic [SW-1:0] best_state;
  logic best_dec;

  m_algo_pmu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_merge = 0, n_partial = 0, n_c1 = 0, n_c0 = 0, n_norm = 0, n_stall = 0, n_restart = 0, n_track = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("[%0t] %s", $time, msg);
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  // survivors before the step
  int p_valid [M], p_state [M], p_metric [M];
  bit pending;
  int p_sym;
  int enc_state;

  task automatic snapshot();
    for (int k = 0; k < M; k++) begin
      p_valid[k]  = surv_valid[k];
      p_state[k]  = int'(surv_state[k]);
      p_metric[k] = int'(surv_metric[k]);
    end
  endtask

  task automatic check_initial();
    for (int k = 0; k < M; k++)
      check(surv_valid[k] == (k == 0) && (k != 0 || (surv_state[k] == 0 && surv_metric[k] == 0)),
            $sformatf("start condition wrong at %0d", k));
  endtask

  task automatic check_step(bit track);
    int best [int];
    int want [$], got [$];
    int nprev, nexp, mn, last, nvalid, c1_exp;
    best.delete(); want = {}; got = {};
    nprev = 0;
    for (int k = 0; k < M; k++) begin
      if (!p_valid[k]) continue;
      nprev++;
      for (int b = 0; b < 2; b++) begin
        int s, m;
        s = mref_pkg::next_state(p_state[k], b);
        m = p_metric[k] + mref_pkg::tm_of(p_sym, p_state[k], b);
        if (!best.exists(s) || best[s] > m) best[s] = m;
      end
    end
    foreach (best[s]) want.push_back(best[s]);
    mref_pkg::isort(want);
    nexp = want.size() < M ? want.size() : M;
    mn = want[0];
    check(int'(step_min) == mn, $sformatf("step_min %0d want %0d", step_min, mn));
    check(int'(merge_cnt) == 2 * nprev - best.size(),
          $sformatf("merge_cnt %0d want %0d", merge_cnt, 2 * nprev - best.size()));
    last = -1; nvalid = 0; c1_exp = 0;
    for (int i = 0; i < M; i++) begin
      check(surv_valid[i] == (i < nexp), $sformatf("survivor %0d valid=%0b, %0d expected", i, surv_valid[i], nexp));
      if (!surv_valid[i]) continue;
      nvalid++;
      begin
        int s, raw;
        bit found;
        s = int'(surv_state[i]);
        raw = int'(surv_metric[i]) + mn;
        got.push_back(raw);
        if (s >= (1 << (SW - 1))) c1_exp++;
        check(s > last, $sformatf("survivor %0d state %0d not above %0d", i, s, last));
        last = s;
        check(best.exists(s) && best[s] == raw,
              $sformatf("survivor %0d state %0d metric %0d is not its state's best", i, s, raw));
        found = 0;
        for (int k = 0; k < M; k++)
          if (p_valid[k] && p_state[k] % 2 == int'(surv_dec[i]) &&
              mref_pkg::next_state(p_state[k], s >> (SW - 1)) == s &&
              p_metric[k] + mref_pkg::tm_of(p_sym, p_state[k], s >> (SW - 1)) == raw)
            found = 1;
        check(found, $sformatf("survivor %0d: no extension gives state %0d dec %0d", i, s, surv_dec[i]));
      end
    end
    mref_pkg::isort(got);
    for (int i = 0; i < nexp; i++)
      check(i < got.size() && got[i] == want[i], $sformatf("metric multiset differs at %0d", i));
    check(int'(c1_cnt) == c1_exp, $sformatf("c1_cnt %0d want %0d", c1_cnt, c1_exp));
    check(best_found && int'(best_state) < (1 << SW), "best path flag missing");
    if (merge_cnt != 0) n_merge++;
    if (nvalid < M) n_partial++;
    if (c1_exp > 0) n_c1++;
    if (c1_exp < nvalid) n_c0++;
    if (mn > 0) n_norm++;
    if (track) begin
      int zeros;
      bit seen;
      zeros = 0;
      foreach (best[s]) if (best[s] == mn) zeros++;
      seen = 0;
      for (int i = 0; i < M; i++)
        if (surv_valid[i] && int'(surv_state[i]) == enc_state && surv_metric[i] == 0) seen = 1;
      if (mn == 0 && zeros <= M) begin
        check(seen, $sformatf("encoder state %0d lost", enc_state));
        n_track++;
      end
    end
  endtask

  initial begin
    int phase;
    pending = 0;
    enc_state = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_initial();
    snapshot();
    for (int n = 0; n < NSTEPS; ) begin
      bit track;
      phase = n < 400 ? 0 : n < 800 ? 1 : n < 1200 ? 2 : 3;
      track = (phase == 0) || (phase == 3);
      // stimulus for the next edge
      start = 0;
      if (n == 1200 && n_restart == 0) begin
        start = 1;
        sym_valid = 1;       // start has priority over the symbol
        n_restart++;
      end else if ($urandom % 5 == 0) begin
        sym_valid = 0;
        n_stall++;
      end else begin
        int b, lvl;
        b = $urandom % 2;
        lvl = mref_pkg::level_of(mref_pkg::reg_of(enc_state, b));
        if (phase == 2) p_sym = $signed(8'($urandom));
        else if (phase == 1) p_sym = lvl + int'($urandom % 81) - 40;
        else p_sym = lvl;
        if (p_sym > 127) p_sym = 127;
        if (p_sym < -128) p_sym = -128;
        enc_state = mref_pkg::next_state(enc_state, b);
        sym = SYMW'(p_sym);
        sym_valid = 1;
      end
      @(posedge clk);
      #1;
      if (start) begin
        check(!out_valid, "out_valid after start");
        check_initial();
        enc_state = 0;
      end else if (sym_valid) begin
        check(out_valid, "out_valid missing one cycle after sym_valid");
        check_step(track);
        n++;
      end else begin
        check(!out_valid, "out_valid without a symbol");
        for (int k = 0; k < M; k++)
          check(surv_valid[k] == 1'(p_valid[k]) && int'(surv_state[k]) == p_state[k] &&
                int'(surv_metric[k]) == p_metric[k], "survivors changed during a stall");
      end
      snapshot();
      @(negedge clk);
    end
    sym_valid = 0;
    check(n_merge > 0,   "merged path rejection never happened");
    check(n_partial > 0, "partly filled survivor list never happened");
    check(n_c1 > 0 && n_c0 > 0, "survivors never came from both sets");
    check(n_norm > 0,    "metric normalisation never subtracted anything");
    check(n_stall > 0,   "no stall");
    check(n_restart > 0, "no restart");
    check(n_track > 0,   "encoder path never tracked");
    $display("steps=%0d cycles=%0d merges=%0d partial=%0d from_c1=%0d from_c0=%0d normalised=%0d stalls=%0d restarts=%0d tracked=%0d",
             NSTEPS, cycles, n_merge, n_partial, n_c1, n_c0, n_norm, n_stall, n_restart, n_track);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
