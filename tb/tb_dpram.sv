// tb_dpram: self-checking test of the dual-ported SRAM block.
//
// Two blocks share random stimulus on a small depth (so read and write
// addresses collide often): one without and one with read-during-write
// forwarding. A word-array model predicts each read one cycle ahead: the
// word before this cycle's write, or the written word for the forwarding
// block when the addresses match. Checks the read latency of one cycle,
// read-after-write, and both read-during-write behaviours.
module tb_dpram;
  localparam int unsigned W = 16;
  localparam int unsigned D = 16;
  localparam int unsigned AW = $clog2(D);
  localparam int unsigned NCYC = 4000;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata;
  logic [W-1:0]  rdata_old, rdata_new;

  int unsigned checks = 0, failures = 0;
  int unsigned n_rdw = 0, n_raw = 0;

  always #5 clk = ~clk;

  dpram #(.W(W), .D(D), .RDW(1'b0)) u_old (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata_old));
  dpram #(.W(W), .D(D), .RDW(1'b1)) u_new (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata_new));

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0]  ref_mem [D];
    logic [W-1:0]  exp_old, exp_new;
    logic          have_exp;
    logic [AW-1:0] last_waddr;
    logic          last_we;
    for (int i = 0; i < D; i++) ref_mem[i] = '0;
    have_exp = 1'b0;
    last_we  = 1'b0;
    last_waddr = '0;
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (have_exp) begin
        checks += 2;
        if (rdata_old !== exp_old) begin
          failures++;
          if (failures < 10) $display("cycle %0d: RDW=0 read %h, expected %h", c, rdata_old, exp_old);
        end
        if (rdata_new !== exp_new) begin
          failures++;
          if (failures < 10) $display("cycle %0d: RDW=1 read %h, expected %h", c, rdata_new, exp_new);
        end
      end
      we    = ($urandom_range(0, 3) != 0);
      waddr = AW'($urandom_range(0, D - 1));
      wdata = W'($urandom);
      raddr = (c % 4 == 0) ? waddr : AW'($urandom_range(0, D - 1));
      if (last_we && raddr == last_waddr) n_raw++;
      exp_old = ref_mem[raddr];
      exp_new = (we && waddr == raddr) ? wdata : ref_mem[raddr];
      if (we && waddr == raddr) n_rdw++;
      if (we) ref_mem[waddr] = wdata;
      last_we = we;
      last_waddr = waddr;
      have_exp = 1'b1;
    end
    checks++;
    if (n_rdw == 0 || n_raw == 0) begin
      failures++;
      $display("coverage: read-during-write %0d, read-after-write %0d", n_rdw, n_raw);
    end
    $display("read-during-write cases %0d, read-after-write cases %0d", n_rdw, n_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
