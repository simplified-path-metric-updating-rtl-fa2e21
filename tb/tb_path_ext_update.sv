// tb_path_ext_update: checks path extension and path metric update on random
// survivor lists and symbols. For survivor k with state s and bit b the
// extended path must have state (b, s[SW-1:1]), decision bit s[0], metric
// parent + |sym - level| from the reference labels, and the parent's valid
// flag; paths from empty survivors must be empty with the all-ones metric.
module tb_path_ext_update;
  import mpath_pkg::*;

  localparam int M = 16;

  path_t surv [M], c0 [M], c1 [M];
  logic signed [SYMW-1:0] sym;
  int checks = 0, failures = 0;

  path_ext_update #(.M(M)) dut (.surv, .sym, .c0, .c1);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      sym = SYMW'($urandom);
      for (int k = 0; k < M; k++) begin
        surv[k].valid  = ($urandom % 6) != 0;
        surv[k].state  = SW'($urandom);
        surv[k].metric = MW'($urandom % 3000);
        surv[k].dec    = 1'($urandom);
      end
      #1;
      for (int b = 0; b < 2; b++)
        for (int k = 0; k < M; k++) begin
          path_t got;
          int s;
          bit ok;
          got = b ? c1[k] : c0[k];
          s = int'(surv[k].state);
          if (surv[k].valid)
            ok = got.valid && int'(got.state) == mref_pkg::next_state(s, b) &&
                 int'(got.dec) == s % 2 &&
                 int'(got.metric) == int'(surv[k].metric) + mref_pkg::tm_of(int'(sym), s, b);
          else
            ok = !got.valid && got.metric == METRIC_MAX;
          checks++;
          if (!ok) begin
            failures++;
            if (failures < 10)
              $display("it=%0d b=%0d k=%0d s=%0h: got state %0h dec %0d metric %0d valid %0b", it, b, k,
                       s, got.state, got.dec, got.metric, got.valid);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
