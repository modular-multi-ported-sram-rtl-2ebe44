// mpram_traffic: testbench helper that drives one multi-ported memory of a
// given size with random traffic and checks every read.
//
// Write addresses come half from 16 "hot" addresses spread over the whole
// depth (so ports collide and overwrite each other's words, also in
// consecutive cycles), half from the full range. Reads target the hot
// addresses, the addresses written in the previous cycle, or any address.
// Each read is compared, one cycle later, with a sparse model of the memory
// in read-after-write mode: the word after all writes presented up to the
// previous cycle. Results are counted on the outputs; done rises when the
// run is over. Used by tb_mpram_workloads.
module mpram_traffic
  import mpram_pkg::*;
#(
  parameter int unsigned NW   = 3,
  parameter int unsigned NR   = 3,
  parameter int unsigned W    = 16,
  parameter int unsigned D    = 16384,
  parameter lvt_e        LVT  = LVT_1HT,
  parameter int unsigned NCYC = 2000
) (
  input  logic        clk,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_raw,        // reads of an address written in the previous cycle
  output int unsigned n_waw,        // cross-port writes to one address in consecutive cycles
  output int unsigned n_banks_seen  // data banks that served at least one read
);
  localparam int unsigned AW = $clog2(D);

  logic          rst;
  logic          we    [NW];
  logic [AW-1:0] waddr [NW];
  logic [W-1:0]  wdata [NW];
  logic [AW-1:0] raddr [NR];
  logic [W-1:0]  rdata [NR];

  mpram #(.NW(NW), .NR(NR), .W(W), .D(D), .LVT(LVT), .BYP(BYP_RAW)) dut (
    .clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata));

  logic [W-1:0]  mem [logic [AW-1:0]];  // absent = 0
  int unsigned   own [logic [AW-1:0]];  // last writer, absent = 0
  logic [W-1:0]  exp_q [NR];
  logic          have_exp;
  logic          last_we    [NW];
  logic [AW-1:0] last_waddr [NW];
  bit            bank_seen  [NW];

  function automatic logic [AW-1:0] hot_addr(input int unsigned i);
    return AW'(i * (D / 16) + i);
  endfunction

  initial begin
    logic clash;
    done = 1'b0;
    checks = 0; failures = 0; n_raw = 0; n_waw = 0; n_banks_seen = 0;
    have_exp = 1'b0;
    for (int k = 0; k < NW; k++) begin
      we[k] = 1'b0; waddr[k] = '0; wdata[k] = '0;
      last_we[k] = 1'b0; last_waddr[k] = '0; bank_seen[k] = 1'b0;
    end
    for (int r = 0; r < NR; r++) raddr[r] = '0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c <= NCYC; c++) begin
      @(negedge clk);
      if (have_exp) begin
        for (int r = 0; r < NR; r++) begin
          checks++;
          if (rdata[r] !== exp_q[r]) begin
            failures++;
            if (failures < 5)
              $display("%0dW/%0dR %0dx%0d lvt %0d cycle %0d port %0d: read %h, expected %h",
                       NW, NR, D, W, LVT, c, r, rdata[r], exp_q[r]);
          end
        end
      end
      if (c == NCYC) break;
      for (int k = 0; k < NW; k++) begin
        we[k]    = ($urandom_range(0, 2) != 0);
        waddr[k] = ($urandom_range(0, 1) == 1) ? hot_addr($urandom_range(0, 15))
                                               : AW'($urandom_range(0, D - 1));
        wdata[k] = W'($urandom);
        clash = 1'b0;
        for (int j = 0; j < k; j++) if (we[j] && waddr[j] == waddr[k]) clash = 1'b1;
        if (clash) we[k] = 1'b0;
      end
      for (int r = 0; r < NR; r++) begin
        case ($urandom_range(0, 2))
          0: raddr[r] = hot_addr($urandom_range(0, 15));
          1: raddr[r] = last_waddr[$urandom_range(0, NW - 1)];
          default: raddr[r] = AW'($urandom_range(0, D - 1));
        endcase
      end
      // Expected words, then commit this cycle's writes to the model.
      for (int r = 0; r < NR; r++) begin
        exp_q[r] = mem.exists(raddr[r]) ? mem[raddr[r]] : '0;
        bank_seen[own.exists(raddr[r]) ? own[raddr[r]] : 0] = 1'b1;
        for (int k = 0; k < NW; k++) if (last_we[k] && last_waddr[k] == raddr[r]) n_raw++;
      end
      for (int k = 0; k < NW; k++)
        for (int j = 0; j < NW; j++)
          if (j != k && we[k] && last_we[j] && waddr[k] == last_waddr[j]) n_waw++;
      for (int k = 0; k < NW; k++) if (we[k]) begin
        mem[waddr[k]] = wdata[k];
        own[waddr[k]] = k;
      end
      last_we    = we;
      last_waddr = waddr;
      have_exp   = 1'b1;
    end
    for (int k = 0; k < NW; k++) if (bank_seen[k]) n_banks_seen++;
    done = 1'b1;
  end
endmodule
