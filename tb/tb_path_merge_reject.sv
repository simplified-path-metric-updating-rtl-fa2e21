// tb_path_merge_reject: checks the suppression of merged paths. Each trial
// builds a state-sorted survivor list of distinct states (valid entries first,
// often with neighbouring states that differ only in the LSB, so that they
// merge), extends it with one input bit and gives random metrics (often
// equal). The reference rejects a valid path when another valid path of the
// set has the same state and a smaller metric, or the same metric and a
// smaller index.
module tb_path_merge_reject;
  import mpath_pkg::*;

  localparam int M = 16;

  path_t d [M], q [M];
  logic [M-1:0] rejected;
  int checks = 0, failures = 0, merges = 0, ties = 0;

  path_merge_reject #(.M(M)) dut (.d, .q, .rejected);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      int st[$];
      int nv, b;
      st = {};
      nv = 1 + $urandom % M;
      b  = $urandom % 2;
      // distinct parent states, pairs sharing all but the LSB are favoured
      while (st.size() < nv) begin
        int s;
        bit dup;
        s = (st.size() > 0 && $urandom % 2) ? (st[st.size()-1] ^ 1) : int'($urandom % (1 << SW));
        dup = 0;
        foreach (st[i]) if (st[i] == s) dup = 1;
        if (!dup) st.push_back(s);
      end
      mref_pkg::isort(st);
      for (int k = 0; k < M; k++) begin
        if (k < nv) begin
          d[k].valid  = 1'b1;
          d[k].state  = SW'(mref_pkg::next_state(st[k], b));
          d[k].dec    = 1'(st[k] % 2);
          d[k].metric = MW'($urandom % 8);
        end else begin
          d[k] = PATH_NONE;
          d[k].state = SW'($urandom);
        end
      end
      #1;
      for (int j = 0; j < M; j++) begin
        bit exp_rej;
        exp_rej = 0;
        if (d[j].valid)
          for (int i = 0; i < M; i++)
            if (i != j && d[i].valid && d[i].state == d[j].state) begin
              if (d[i].metric < d[j].metric || (d[i].metric == d[j].metric && i < j)) exp_rej = 1;
              if (d[i].metric == d[j].metric) ties++;
            end
        if (exp_rej) merges++;
        checks++;
        if (rejected[j] != exp_rej ||
            (exp_rej && (q[j].valid || q[j].metric != METRIC_MAX)) ||
            (!exp_rej && q[j] != d[j])) begin
          failures++;
          if (failures < 10)
            $display("it=%0d j=%0d state=%0h metric=%0d: rejected=%0b want %0b", it, j,
                     d[j].state, d[j].metric, rejected[j], exp_rej);
        end
      end
    end
    checks++;
    if (merges == 0 || ties == 0) begin
      failures++;
      $display("merges=%0d ties=%0d: a case was never exercised", merges, ties);
    end
    $display("merged paths rejected: %0d", merges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
