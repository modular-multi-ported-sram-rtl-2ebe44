// tb_ilvt_1ht: self-checking test of the one-hot-coded invalidation
// live-value table, in the 3-write / 2-read configuration.
//
// Two tables get the same random stimulus on a 16-entry depth, so that
// ports often write the same address in consecutive cycles: one with
// forwarding on its output ports, one without. A model keeps the last
// writer of every address. The forwarding table must name, for a read
// issued in cycle c, the last writer among writes issued up to cycle c-1;
// the other one the last writer up to cycle c-2. Counts and requires:
// reads naming every bank, back-to-back writes to one address from
// different ports, and all write ports writing in one cycle.
module tb_ilvt_1ht;
  import mpram_pkg::*;
  localparam int unsigned NW = 3;
  localparam int unsigned NR = 2;
  localparam int unsigned D  = 16;
  localparam int unsigned AW = $clog2(D);
  localparam int unsigned BW = bank_id_w(NW);
  localparam int unsigned NCYC = 6000;

  logic          clk = 1'b0;
  logic          rst;
  logic          we    [NW];
  logic [AW-1:0] waddr [NW];
  logic [AW-1:0] raddr [NR];
  logic [BW-1:0] sel_fwd [NR];
  logic [BW-1:0] sel_lag [NR];

  int unsigned checks = 0, failures = 0;
  int unsigned n_owner [NW];
  int unsigned n_waw = 0, n_allw = 0;

  always #5 clk = ~clk;

  ilvt_1ht #(.NW(NW), .NR(NR), .D(D), .OUT_RDW(1'b1)) dut_fwd (
    .clk(clk), .rst(rst), .we(we), .waddr(waddr), .raddr(raddr), .rbanksel(sel_fwd));
  ilvt_1ht #(.NW(NW), .NR(NR), .D(D), .OUT_RDW(1'b0)) dut_lag (
    .clk(clk), .rst(rst), .we(we), .waddr(waddr), .raddr(raddr), .rbanksel(sel_lag));

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BW-1:0] owner      [D];
    logic [BW-1:0] owner_prev [D];
    logic [BW-1:0] exp_fwd [NR];
    logic [BW-1:0] exp_lag [NR];
    logic          last_we    [NW];
    logic [AW-1:0] last_waddr [NW];
    logic          have_exp, clash;
    int unsigned   nwr;
    for (int a = 0; a < D; a++) begin owner[a] = '0; owner_prev[a] = '0; end
    for (int k = 0; k < NW; k++) begin
      n_owner[k] = 0; we[k] = 1'b0; waddr[k] = '0; last_we[k] = 1'b0; last_waddr[k] = '0;
    end
    for (int r = 0; r < NR; r++) raddr[r] = '0;
    have_exp = 1'b0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (have_exp) begin
        for (int r = 0; r < NR; r++) begin
          checks += 2;
          n_owner[exp_fwd[r]]++;
          if (sel_fwd[r] !== exp_fwd[r]) begin
            failures++;
            if (failures < 10) $display("cycle %0d port %0d: forwarding table names %0d, expected %0d", c, r, sel_fwd[r], exp_fwd[r]);
          end
          if (sel_lag[r] !== exp_lag[r]) begin
            failures++;
            if (failures < 10) $display("cycle %0d port %0d: lagging table names %0d, expected %0d", c, r, sel_lag[r], exp_lag[r]);
          end
        end
      end
      // Random writes; no two ports on one address in one cycle.
      nwr = 0;
      for (int k = 0; k < NW; k++) begin
        we[k]    = ($urandom_range(0, 1) == 1);
        waddr[k] = AW'($urandom_range(0, D - 1));
        clash = 1'b0;
        for (int j = 0; j < k; j++) if (we[j] && waddr[j] == waddr[k]) clash = 1'b1;
        if (clash) we[k] = 1'b0;
        if (we[k]) nwr++;
      end
      if (nwr == NW) n_allw++;
      for (int k = 0; k < NW; k++)
        for (int j = 0; j < NW; j++)
          if (j != k && we[k] && last_we[j] && waddr[k] == last_waddr[j]) n_waw++;
      for (int r = 0; r < NR; r++) begin
        raddr[r]   = ($urandom_range(0, 2) == 0) ? waddr[$urandom_range(0, NW - 1)]
                                                 : AW'($urandom_range(0, D - 1));
        exp_fwd[r] = owner[raddr[r]];
        exp_lag[r] = owner_prev[raddr[r]];
      end
      owner_prev = owner;
      for (int k = 0; k < NW; k++) if (we[k]) owner[waddr[k]] = BW'(k);
      last_we    = we;
      last_waddr = waddr;
      have_exp   = 1'b1;
    end
    for (int k = 0; k < NW; k++) begin
      checks++;
      if (n_owner[k] == 0) begin failures++; $display("coverage: bank %0d never named", k); end
    end
    checks += 2;
    if (n_waw == 0)  begin failures++; $display("coverage: no back-to-back writes to one address"); end
    if (n_allw == 0) begin failures++; $display("coverage: never all ports writing"); end
    $display("back-to-back cross-port writes %0d, all-port write cycles %0d", n_waw, n_allw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
