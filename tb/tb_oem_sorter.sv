// tb_oem_sorter: checks the odd-even merge sorting network on both keys.
// Random path lists (some invalid, many equal keys) go through a metric-keyed
// and a state-keyed instance; each output must be a permutation of the input
// whose key sequence equals the reference insertion sort, with invalid paths
// last. The compare-element count of the network is checked against the
// closed form (log2(n)^2 - log2(n) + 4) * 2^(log2(n)-2) - 1 for
// n = 4 ... 256, and the sort is also run at M = 4 and M = 128.
module tb_oem_sorter;
  import mpath_pkg::*;

  localparam int M = 16;

  path_t dm [M], qm [M], ds [M], qs [M];
  path_t d4 [4], q4 [4];
  path_t d128 [128], q128 [128];
  int checks = 0, failures = 0;

  oem_sorter #(.M(M),   .KEY(KEY_METRIC)) dut_m   (.d(dm),   .q(qm));
  oem_sorter #(.M(M),   .KEY(KEY_STATE))  dut_s   (.d(ds),   .q(qs));
  oem_sorter #(.M(4),   .KEY(KEY_METRIC)) dut_4   (.d(d4),   .q(q4));
  oem_sorter #(.M(128), .KEY(KEY_STATE))  dut_128 (.d(d128), .q(q128));

  function automatic int key_of(path_t p, bit by_state);
    return (p.valid ? 0 : (1 << 20)) + (by_state ? int'(p.state) : int'(p.metric));
  endfunction

  function automatic path_t rand_path();
    path_t p;
    p.valid  = ($urandom % 5) != 0;
    p.state  = SW'($urandom % 64);
    p.metric = p.valid ? MW'($urandom % 40) : METRIC_MAX;
    p.dec    = 1'($urandom);
    return p;
  endfunction

  task automatic check_sorted(path_t din[$], path_t dout[$], bit by_state, string tag);
    int ref_k[$];
    int n;
    n = din.size();
    foreach (din[i]) ref_k.push_back(key_of(din[i], by_state));
    mref_pkg::isort(ref_k);
    for (int i = 0; i < n; i++) begin
      int cin, cout;
      checks++;
      if (key_of(dout[i], by_state) != ref_k[i]) begin
        failures++;
        if (failures < 10) $display("%s: position %0d key %0d want %0d", tag, i, key_of(dout[i], by_state), ref_k[i]);
      end
      // permutation: each output record occurs as often in the input
      cin = 0; cout = 0;
      for (int j = 0; j < n; j++) begin
        if (din[j] == dout[i]) cin++;
        if (dout[j] == dout[i]) cout++;
      end
      checks++;
      if (cin != cout) begin
        failures++;
        if (failures < 10) $display("%s: output %0d is not a permutation of the input", tag, i);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int table1 [6] = '{5, 19, 63, 191, 543, 1471};
    for (int e = 2; e <= 8; e++) begin
      int n, formula;
      n = 1 << e;
      formula = (e * e - e + 4) * (1 << (e - 2)) - 1;
      checks++;
      if (oem_count(n) != formula) begin
        failures++;
        $display("compare elements for n=%0d: %0d, closed form %0d", n, oem_count(n), formula);
      end
      if (e <= 7) begin
        checks++;
        if (oem_count(n) != table1[e-2]) begin
          failures++;
          $display("compare elements for n=%0d: %0d, expected %0d", n, oem_count(n), table1[e-2]);
        end
      end
    end
    for (int it = 0; it < 300; it++) begin
      path_t a[$], c[$], e[$], b[$];
      a = {}; c = {}; e = {};
      for (int i = 0; i < M; i++) begin a.push_back(rand_path()); dm[i] = a[i]; ds[i] = a[i]; end
      for (int i = 0; i < 4; i++) begin c.push_back(rand_path()); d4[i] = c[i]; end
      for (int i = 0; i < 128; i++) begin e.push_back(rand_path()); d128[i] = e[i]; end
      #1;
      b = {}; for (int i = 0; i < M; i++) b.push_back(qm[i]);
      check_sorted(a, b, 0, "metric");
      b = {}; for (int i = 0; i < M; i++) b.push_back(qs[i]);
      check_sorted(a, b, 1, "state");
      b = {}; for (int i = 0; i < 4; i++) b.push_back(q4[i]);
      check_sorted(c, b, 0, "m4");
      if (it < 40) begin
        b = {}; for (int i = 0; i < 128; i++) b.push_back(q128[i]);
        check_sorted(e, b, 1, "s128");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
