// tb_table1_sizes: runs the path metric updating unit at every survivor count
// of the hardware-complexity table, M = 4, 8, 16, 32, 64 and 128, each through
// the full pmu_check sequence (encoded, noisy and random symbols, stalls,
// restart), and checks the compare-element arithmetic of the table:
//   two 2M-item sorters of the state-then-metric scheme: 2 * oem(2M)
//   this structure, as tabulated: 3 * oem(M) + M/2
//   this structure, as built (one full merge column): 3 * oem(M) + M
// where oem(n) is the compare-element count of an n-item odd-even merge sort
// network as oem_sorter builds it.
module tb_table1_sizes;
  import mpath_pkg::*;

  localparam int NSIZES = 6;
  localparam int SIZES [NSIZES]    = '{4, 8, 16, 32, 64, 128};
  localparam int T_TWO_2M [NSIZES] = '{38, 126, 382, 1086, 2942, 7678};
  localparam int T_THREE [NSIZES]  = '{17, 61, 197, 589, 1661, 4477};

  logic [NSIZES-1:0] done;
  int ck [NSIZES];
  int fl [NSIZES];
  int checks = 0, failures = 0;

  pmu_check #(.M(4),   .NSTEPS(4000)) u_m4   (.done(done[0]), .checks(ck[0]), .failures(fl[0]));
  pmu_check #(.M(8),   .NSTEPS(1000)) u_m8   (.done(done[1]), .checks(ck[1]), .failures(fl[1]));
  pmu_check #(.M(16),  .NSTEPS(400)) u_m16  (.done(done[2]), .checks(ck[2]), .failures(fl[2]));
  pmu_check #(.M(32),  .NSTEPS(240)) u_m32  (.done(done[3]), .checks(ck[3]), .failures(fl[3]));
  pmu_check #(.M(64),  .NSTEPS(160)) u_m64  (.done(done[4]), .checks(ck[4]), .failures(fl[4]));
  pmu_check #(.M(128), .NSTEPS(120)) u_m128 (.done(done[5]), .checks(ck[5]), .failures(fl[5]));

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NSIZES; i++) begin
      int m, two, tab, built;
      m = SIZES[i];
      two   = 2 * oem_count(2 * m);
      tab   = 3 * oem_count(m) + m / 2;
      built = 3 * oem_count(m) + m;
      checks++;
      if (two != T_TWO_2M[i]) begin
        failures++;
        $display("M=%0d: two 2M-item sorters need %0d compare elements, table says %0d", m, two, T_TWO_2M[i]);
      end
      checks++;
      if (tab != T_THREE[i]) begin
        failures++;
        $display("M=%0d: three M-item sorters + M/2 give %0d, table says %0d", m, tab, T_THREE[i]);
      end
      $display("M=%0d: compare elements %0d (two 2M sorters) vs %0d (built), reduction %0d%%",
               m, two, built, 100 * (two - built) / two);
    end
    wait (&done);
    for (int i = 0; i < NSIZES; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
