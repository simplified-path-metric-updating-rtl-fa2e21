// tb_tm_pm_update: checks transition metric computation and path metric
// updating. Random symbols, parent metrics (some near the saturation limit)
// and parent valid flags; each updated metric is compared with the parent
// metric plus the reference absolute-error distortion, saturated at all-ones,
// and with all-ones for invalid parents.
module tb_tm_pm_update;
  import mpath_pkg::*;

  localparam int M = 16;

  logic signed [SYMW-1:0] sym;
  logic [MW-1:0] cur_metric [M];
  logic          cur_valid  [M];
  logic [SW-1:0] cur_state  [M];
  logic [SW-1:0] ext_state  [2][M];
  logic          ext_dec    [2][M];
  logic [MW-1:0] new_metric [2][M];
  int checks = 0, failures = 0, sat_seen = 0;

  tm_pm_update  #(.M(M)) dut (.sym, .cur_metric, .cur_valid, .ext_state, .ext_dec, .new_metric);

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
      if (it % 7 == 0) sym = -128;
      if (it % 7 == 1) sym = 127;
      for (int k = 0; k < M; k++) begin
        cur_state[k]  = SW'($urandom);
        cur_valid[k]  = ($urandom % 8) != 0;
        cur_metric[k] = ($urandom % 4 == 0) ? MW'(65535 - ($urandom % 300)) : MW'($urandom % 5000);
        for (int b = 0; b < 2; b++) begin
          ext_state[b][k] = SW'(mref_pkg::next_state(int'(cur_state[k]), b));
          ext_dec[b][k]   = 1'(cur_state[k] % 2);
        end
      end
      #1;
      for (int b = 0; b < 2; b++)
        for (int k = 0; k < M; k++) begin
          int exp_m;
          if (!cur_valid[k]) exp_m = 65535;
          else begin
            exp_m = int'(cur_metric[k]) + mref_pkg::tm_of(int'(sym), int'(cur_state[k]), b);
            if (exp_m > 65535) begin
              exp_m = 65535;
              sat_seen++;
            end
          end
          checks++;
          if (int'(new_metric[b][k]) != exp_m) begin
            failures++;
            if (failures < 10)
              $display("mismatch sym=%0d s=%0h b=%0d pm=%0d: got %0d want %0d", sym,
                       cur_state[k], b, cur_metric[k], new_metric[b][k], exp_m);
          end
        end
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
