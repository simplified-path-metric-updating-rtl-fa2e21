// tb_path_selector: checks the whole sorting and selection block. Each trial
// builds a state-sorted survivor list of distinct states, extends it into the
// sets C0 and C1 with the reference successor rule, and gives every extended
// path a random metric (small, so that ties are frequent). The reference
// keeps the best metric of each state and then the M smallest metrics. The
// block's output must: hold min(M, distinct states) valid paths, first, in
// strictly ascending state order; give each valid path the reference best
// metric of its state and a decision bit of an extension reaching it with
// that metric; have the same metric multiset as the reference; and report the
// smallest metric on min_metric.
module tb_path_selector;
  import mpath_pkg::*;

  localparam int M = 16;

  path_t c0 [M], c1 [M], surv [M];
  logic [MW-1:0] min_metric;
  logic [M-1:0] rej0, rej1, from_c1;
  int checks = 0, failures = 0, merges = 0, partial = 0;

  path_selector #(.M(M)) dut (.c0, .c1, .surv, .min_metric, .rej0, .rej1, .from_c1);

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("%s", msg);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      int st[$], best[int], want[$], got[$];
      int nv, nexp, last;
      st = {}; want = {}; got = {}; best.delete();
      nv = 1 + $urandom % M;
      while (st.size() < nv) begin
        int s;
        bit dup;
        s = (st.size() > 0 && $urandom % 2) ? (st[st.size()-1] ^ 1) : int'($urandom % 64);
        dup = 0;
        foreach (st[i]) if (st[i] == s) dup = 1;
        if (!dup) st.push_back(s);
      end
      mref_pkg::isort(st);
      for (int k = 0; k < M; k++) begin
        c0[k] = PATH_NONE;
        c1[k] = PATH_NONE;
        if (k < nv) begin
          c0[k] = '{valid: 1'b1, state: SW'(mref_pkg::next_state(st[k], 0)),
                    metric: MW'($urandom % 30), dec: 1'(st[k] % 2)};
          c1[k] = '{valid: 1'b1, state: SW'(mref_pkg::next_state(st[k], 1)),
                    metric: MW'($urandom % 30), dec: 1'(st[k] % 2)};
        end
      end
      for (int k = 0; k < nv; k++) begin
        int s0, s1;
        s0 = int'(c0[k].state); s1 = int'(c1[k].state);
        if (!best.exists(s0) || best[s0] > int'(c0[k].metric)) best[s0] = int'(c0[k].metric);
        if (!best.exists(s1) || best[s1] > int'(c1[k].metric)) best[s1] = int'(c1[k].metric);
      end
      foreach (best[s]) want.push_back(best[s]);
      mref_pkg::isort(want);
      nexp = want.size() < M ? want.size() : M;
      if (2 * nv > want.size()) merges++;
      if (nexp < M) partial++;
      #1;
      last = -1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (surv[i].valid != (i < nexp)) fail($sformatf("it=%0d i=%0d: valid=%0b", it, i, surv[i].valid));
        if (surv[i].valid) begin
          int s;
          bit found;
          s = int'(surv[i].state);
          got.push_back(int'(surv[i].metric));
          checks++;
          if (s <= last) fail($sformatf("it=%0d i=%0d: state %0d not above %0d", it, i, s, last));
          last = s;
          checks++;
          if (!best.exists(s) || best[s] != int'(surv[i].metric))
            fail($sformatf("it=%0d i=%0d: state %0d metric %0d is not the best of its state", it, i, s, surv[i].metric));
          found = 0;
          for (int k = 0; k < nv; k++) begin
            if (c0[k].state == surv[i].state && c0[k].metric == surv[i].metric && c0[k].dec == surv[i].dec) found = 1;
            if (c1[k].state == surv[i].state && c1[k].metric == surv[i].metric && c1[k].dec == surv[i].dec) found = 1;
          end
          checks++;
          if (!found) fail($sformatf("it=%0d i=%0d: no extension matches the survivor", it, i));
        end
      end
      mref_pkg::isort(got);
      for (int i = 0; i < nexp; i++) begin
        checks++;
        if (i >= got.size() || got[i] != want[i]) fail($sformatf("it=%0d: metric multiset differs at %0d", it, i));
      end
      checks++;
      if (int'(min_metric) != want[0]) fail($sformatf("it=%0d: min_metric %0d want %0d", it, min_metric, want[0]));
    end
    checks++;
    if (merges == 0 || partial == 0) fail("merged paths or a partly filled list never occurred");
    $display("trials with merged paths: %0d, with fewer than M states: %0d", merges, partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
