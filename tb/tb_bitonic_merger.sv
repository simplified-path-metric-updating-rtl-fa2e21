// tb_bitonic_merger: checks the one-column bitonic merge. Two random lists of
// paths sorted by metric (invalid entries last, many equal metrics) are
// merged; the output must hold exactly the M smallest keys of the 2M inputs
// (as a multiset), every output must be the input it claims to come from, and
// from_b must be set exactly where the b entry was strictly smaller.
module tb_bitonic_merger;
  import mpath_pkg::*;

  localparam int M = 16;

  path_t a [M], b [M], q [M];
  logic [M-1:0] from_b;
  int checks = 0, failures = 0, both_used = 0;

  bitonic_merger #(.M(M)) dut (.a, .b, .q, .from_b);

  function automatic int key_of(path_t p);
    return (p.valid ? 0 : (1 << 20)) + int'(p.metric);
  endfunction

  task automatic fill_sorted(output path_t l [M]);
    int ks[$];
    int nv;
    ks = {};
    nv = $urandom % (M + 1);
    for (int i = 0; i < nv; i++) ks.push_back($urandom % 50);
    mref_pkg::isort(ks);
    for (int i = 0; i < M; i++) begin
      if (i < nv) begin
        l[i].valid = 1'b1;
        l[i].metric = MW'(ks[i]);
      end else begin
        l[i].valid = 1'b0;
        l[i].metric = METRIC_MAX;
      end
      l[i].state = SW'($urandom);
      l[i].dec   = 1'($urandom);
    end
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
      int all[$], got[$];
      all = {}; got = {};
      fill_sorted(a);
      fill_sorted(b);
      #1;
      for (int i = 0; i < M; i++) begin
        all.push_back(key_of(a[i]));
        all.push_back(key_of(b[i]));
        got.push_back(key_of(q[i]));
        checks++;
        if (from_b[i] != (key_of(b[M-1-i]) < key_of(a[i])) ||
            q[i] != (from_b[i] ? b[M-1-i] : a[i])) begin
          failures++;
          if (failures < 10) $display("it=%0d i=%0d: wrong selection", it, i);
        end
      end
      mref_pkg::isort(all);
      mref_pkg::isort(got);
      for (int i = 0; i < M; i++) begin
        checks++;
        if (got[i] != all[i]) begin
          failures++;
          if (failures < 10) $display("it=%0d: %0d-th smallest key %0d, want %0d", it, i, got[i], all[i]);
        end
      end
      if (from_b != '0 && from_b != '1) both_used++;
    end
    checks++;
    if (both_used == 0) begin
      failures++;
      $display("outputs never taken from both lists");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
