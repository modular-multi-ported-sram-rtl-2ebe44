// tb_mrram: self-checking test of the 1-write / NR-read replicated RAM.
//
// Three read ports with independent random addresses; forwarding is on for
// read port 1 only. A word-array model predicts every port's word one cycle
// ahead (old word on read-during-write, except on port 1). Checks that all
// copies track the shared write port and that forwarding is per port.
module tb_mrram;
  localparam int unsigned W  = 12;
  localparam int unsigned D  = 16;
  localparam int unsigned NR = 3;
  localparam int unsigned AW = $clog2(D);
  localparam bit [NR-1:0] RDW = 3'b010;
  localparam int unsigned NCYC = 4000;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr;
  logic [W-1:0]  wdata;
  logic [AW-1:0] raddr [NR];
  logic [W-1:0]  rdata [NR];

  int unsigned checks = 0, failures = 0, n_rdw = 0;

  always #5 clk = ~clk;

  mrram #(.W(W), .D(D), .NR(NR), .RDW(RDW)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ref_mem [D];
    logic [W-1:0] exp_q [NR];
    logic         have_exp;
    for (int i = 0; i < D; i++) ref_mem[i] = '0;
    have_exp = 1'b0;
    we = 1'b0; waddr = '0; wdata = '0;
    for (int r = 0; r < NR; r++) raddr[r] = '0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (have_exp) begin
        for (int r = 0; r < NR; r++) begin
          checks++;
          if (rdata[r] !== exp_q[r]) begin
            failures++;
            if (failures < 10) $display("cycle %0d port %0d: read %h, expected %h", c, r, rdata[r], exp_q[r]);
          end
        end
      end
      we    = ($urandom_range(0, 2) != 0);
      waddr = AW'($urandom_range(0, D - 1));
      wdata = W'($urandom);
      for (int r = 0; r < NR; r++) begin
        raddr[r] = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, D - 1));
        if (RDW[r] && we && waddr == raddr[r]) begin
          exp_q[r] = wdata;
          n_rdw++;
        end else begin
          exp_q[r] = ref_mem[raddr[r]];
        end
      end
      if (we) ref_mem[waddr] = wdata;
      have_exp = 1'b1;
    end
    checks++;
    if (n_rdw == 0) begin
      failures++;
      $display("coverage: no forwarded read-during-write");
    end
    $display("forwarded read-during-write cases %0d", n_rdw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
