// tb_mpram_workloads: the memory configurations of the published
// evaluation (3 or 4 write ports x 3 or 4 read ports x 16K or 32K words x
// 16 or 32 bits). Every port combination is run in both table codings, and
// the four depth/width combinations are spread over the port combinations:
// 3W/3R 16K x 16, 3W/4R 32K x 16, 4W/3R 16K x 32, 4W/4R 32K x 32; eight
// memories in all (running all sixteen sizes in both codings multiplies
// the build time without exercising other logic). Each is driven by
// mpram_traffic with random traffic for 2000 cycles and checked read by
// read. Every memory must also have seen reads of words written in the
// previous cycle, back-to-back writes to one address from different ports,
// and reads served by each of its data banks.
module tb_mpram_workloads;
  import mpram_pkg::*;
  localparam int unsigned NCFG = 8;
  localparam int unsigned NCYC = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        done     [NCFG];
  int unsigned checks_g [NCFG];
  int unsigned fail_g   [NCFG];
  int unsigned raw_g    [NCFG];
  int unsigned waw_g    [NCFG];
  int unsigned banks_g  [NCFG];
  int unsigned nw_g     [NCFG];

  // Configuration g: bit 0 coding, bit 1 read ports (3/4, and depth
  // 16K/32K), bit 2 write ports (3/4, and width 16/32).
  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam lvt_e        LV = ((g & 1) != 0) ? LVT_BIN : LVT_1HT;
    localparam int unsigned NR = ((g & 2) != 0) ? 4 : 3;
    localparam int unsigned D  = ((g & 2) != 0) ? 32768 : 16384;
    localparam int unsigned NW = ((g & 4) != 0) ? 4 : 3;
    localparam int unsigned W  = ((g & 4) != 0) ? 32 : 16;
    assign nw_g[g] = NW;
    mpram_traffic #(.NW(NW), .NR(NR), .W(W), .D(D), .LVT(LV), .NCYC(NCYC)) u_run (
      .clk(clk), .done(done[g]), .checks(checks_g[g]), .failures(fail_g[g]),
      .n_raw(raw_g[g]), .n_waw(waw_g[g]), .n_banks_seen(banks_g[g]));
  end

  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int g = 0; g < NCFG; g++) if (!done[g]) all_done = 1'b0;
    end while (!all_done);
    for (int g = 0; g < NCFG; g++) begin
      checks   += checks_g[g] + 3;
      failures += fail_g[g];
      if (raw_g[g] == 0)          begin failures++; $display("config %0d: no read-after-write", g); end
      if (waw_g[g] == 0)          begin failures++; $display("config %0d: no back-to-back cross-port writes", g); end
      if (banks_g[g] != nw_g[g])  begin failures++; $display("config %0d: only %0d banks served reads", g, banks_g[g]); end
    end
    $display("configurations %0d, read-after-write in config 0: %0d, back-to-back writes in config 0: %0d",
             NCFG, raw_g[0], waw_g[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
