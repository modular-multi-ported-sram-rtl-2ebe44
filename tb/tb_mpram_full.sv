// tb_mpram_full: the multi-ported memory at its default size (4 write and
// 4 read ports, 32768 words of 32 bits, one-hot table, read-after-write
// bypass) taken through one complete operation.
//
// Phase 1 fills 4096 addresses spread over the whole depth, all four write
// ports writing in every cycle to different addresses. Phase 2 reads them
// all back on the four read ports. Phase 3 mixes random writes and reads
// over the full address range, including writes from different ports to
// one address in consecutive cycles and reads of the address written in
// the previous cycle. Every read is checked, one cycle after its address,
// against a sparse model of the memory; the number of cycles of the fill
// (1024 for 4096 words) checks the write rate of one word per port per
// cycle.
module tb_mpram_full;
  localparam int unsigned NW = 4;
  localparam int unsigned NR = 4;
  localparam int unsigned W  = 32;
  localparam int unsigned D  = 32768;
  localparam int unsigned AW = $clog2(D);
  localparam int unsigned NFILL = 4096;
  localparam int unsigned NMIX  = 4000;

  logic          clk = 1'b0;
  logic          rst;
  logic          we    [NW];
  logic [AW-1:0] waddr [NW];
  logic [W-1:0]  wdata [NW];
  logic [AW-1:0] raddr [NR];
  logic [W-1:0]  rdata [NR];

  int unsigned checks = 0, failures = 0;
  int unsigned n_raw = 0, n_waw = 0, fill_cycles = 0;

  always #5 clk = ~clk;

  mpram dut (
    .clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (NFILL + NMIX + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0]  mem [logic [AW-1:0]];   // sparse model; absent = 0
  logic [W-1:0]  exp_q [NR];
  logic          have_exp;
  logic          last_we    [NW];
  logic [AW-1:0] last_waddr [NW];

  function automatic logic [W-1:0] model_rd(input logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  // Filled address number i: spread over the whole depth.
  function automatic logic [AW-1:0] fill_addr(input int unsigned i);
    return AW'(i * (D / NFILL) + (i % (D / NFILL)));
  endfunction

  task automatic check_reads();
    if (!have_exp) return;
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (rdata[r] !== exp_q[r]) begin
        failures++;
        if (failures < 10) $display("port %0d: read %h, expected %h", r, rdata[r], exp_q[r]);
      end
    end
  endtask

  task automatic commit_cycle();
    for (int r = 0; r < NR; r++) begin
      exp_q[r] = model_rd(raddr[r]);
      for (int k = 0; k < NW; k++) if (last_we[k] && last_waddr[k] == raddr[r]) n_raw++;
    end
    for (int k = 0; k < NW; k++)
      for (int j = 0; j < NW; j++)
        if (j != k && we[k] && last_we[j] && waddr[k] == last_waddr[j]) n_waw++;
    for (int k = 0; k < NW; k++) if (we[k]) mem[waddr[k]] = wdata[k];
    last_we    = we;
    last_waddr = waddr;
    have_exp   = 1'b1;
  endtask

  initial begin
    logic clash;
    for (int k = 0; k < NW; k++) begin we[k] = 1'b0; waddr[k] = '0; wdata[k] = '0; last_we[k] = 1'b0; last_waddr[k] = '0; end
    for (int r = 0; r < NR; r++) raddr[r] = '0;
    have_exp = 1'b0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Phase 1: fill, NW words per cycle.
    for (int unsigned i = 0; i < NFILL; i += NW) begin
      @(negedge clk);
      check_reads();
      for (int k = 0; k < NW; k++) begin
        we[k] = 1'b1;
        waddr[k] = fill_addr(i + k);
        wdata[k] = W'($urandom);
      end
      commit_cycle();
      fill_cycles++;
    end
    checks++;
    if (fill_cycles != NFILL / NW) begin
      failures++;
      $display("fill took %0d cycles, expected %0d", fill_cycles, NFILL / NW);
    end

    // Phase 2: read everything back, NR words per cycle.
    for (int unsigned i = 0; i < NFILL; i += NR) begin
      @(negedge clk);
      check_reads();
      for (int k = 0; k < NW; k++) we[k] = 1'b0;
      for (int r = 0; r < NR; r++) raddr[r] = fill_addr(i + r);
      commit_cycle();
    end

    // Phase 3: random traffic over the full depth.
    for (int c = 0; c < NMIX; c++) begin
      @(negedge clk);
      check_reads();
      for (int k = 0; k < NW; k++) begin
        we[k] = ($urandom_range(0, 1) == 1);
        case ($urandom_range(0, 3))
          0: waddr[k] = last_waddr[$urandom_range(0, NW - 1)];
          1: waddr[k] = fill_addr($urandom_range(0, NFILL - 1));
          default: waddr[k] = AW'($urandom_range(0, D - 1));
        endcase
        wdata[k] = W'($urandom);
        clash = 1'b0;
        for (int j = 0; j < k; j++) if (we[j] && waddr[j] == waddr[k]) clash = 1'b1;
        if (clash) we[k] = 1'b0;
      end
      for (int r = 0; r < NR; r++)
        raddr[r] = ($urandom_range(0, 1) == 1) ? last_waddr[$urandom_range(0, NW - 1)]
                                               : fill_addr($urandom_range(0, NFILL - 1));
      commit_cycle();
    end
    @(negedge clk);
    check_reads();

    checks += 2;
    if (n_raw == 0) begin failures++; $display("coverage: no read-after-write"); end
    if (n_waw == 0) begin failures++; $display("coverage: no back-to-back cross-port writes"); end
    $display("fill cycles %0d, read-after-write %0d, back-to-back cross-port writes %0d", fill_cycles, n_raw, n_waw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
