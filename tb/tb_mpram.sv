// tb_mpram: end-to-end self-checking test of the multi-ported memory.
//
// Six memories, 4 write / 4 read ports, 32 words of 16 bits, receive the
// same stimulus: both table codings (one-hot, binary) in each bypass mode
// (none, read-after-write, read-during-write). Each read is checked against
// a word-array model one cycle later (read latency 1):
//   BYP_RAW: the word after all writes issued up to the previous cycle;
//   BYP_RDW: the word after all writes up to and including this cycle;
//   BYP_NON: either of the words after writes up to the previous cycle or
//            up to the cycle before that.
// All six start from the contents of tb/mpram_init.hex (word a is
// (a * 16'h9E37 + 16'h1234) mod 2^16); a first phase reads every address
// before any write to check the initial contents. A directed phase then replays the two-port example of the method: port 0
// writes 0x8C to address 3 while port 1 writes 0x24 to address 1, then the
// two addresses are read back; then port 1 overwrites address 3 and the
// newer word must win. A random phase follows. Counted and required at
// least once: reads served by each data bank, read-after-write and
// read-during-write collisions, back-to-back writes to one address from
// different ports (the table's feedback forwarding), and cycles in which
// all write ports write.
module tb_mpram;
  import mpram_pkg::*;
  localparam int unsigned NW = 4;
  localparam int unsigned NR = 4;
  localparam int unsigned W  = 16;
  localparam int unsigned D  = 32;
  localparam int unsigned AW = $clog2(D);
  localparam int unsigned NCFG = 6;
  localparam int unsigned NCYC = 8000;
  localparam string INIT_FILE = "tb/mpram_init.hex";
  localparam lvt_e CFG_LVT [NCFG] = '{LVT_1HT, LVT_BIN, LVT_1HT, LVT_BIN, LVT_1HT, LVT_BIN};
  localparam byp_e CFG_BYP [NCFG] = '{BYP_RAW, BYP_RAW, BYP_RDW, BYP_RDW, BYP_NON, BYP_NON};

  logic          clk = 1'b0;
  logic          rst;
  logic          we    [NW];
  logic [AW-1:0] waddr [NW];
  logic [W-1:0]  wdata [NW];
  logic [AW-1:0] raddr [NR];
  logic [W-1:0]  rdata [NCFG][NR];

  int unsigned checks = 0, failures = 0;
  int unsigned n_bank [NW];
  int unsigned n_init = 0;
  int unsigned n_raw = 0, n_rdw = 0, n_waw = 0, n_allw = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    mpram #(.NW(NW), .NR(NR), .W(W), .D(D), .LVT(CFG_LVT[g]), .BYP(CFG_BYP[g]), .INIT_FILE(INIT_FILE)) dut (
      .clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
      .raddr(raddr), .rdata(rdata[g]));
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state: words and last writer after writes up to the previous
  // cycle (mem, own) and up to the cycle before (mem_prev).
  logic [W-1:0]  mem      [D];
  logic [W-1:0]  mem_prev [D];
  logic [1:0]    own      [D];
  logic [W-1:0]  exp_raw [NR], exp_rdw [NR], exp_old [NR];
  logic          have_exp;
  logic          last_we    [NW];
  logic [AW-1:0] last_waddr [NW];

  task automatic idle_ports();
    for (int k = 0; k < NW; k++) begin we[k] = 1'b0; waddr[k] = '0; wdata[k] = '0; end
  endtask

  // Check the words read for the addresses presented in the previous cycle.
  task automatic check_reads(input int c);
    if (!have_exp) return;
    for (int r = 0; r < NR; r++) begin
      for (int g = 0; g < NCFG; g++) begin
        logic ok;
        checks++;
        case (CFG_BYP[g])
          BYP_RAW: ok = (rdata[g][r] === exp_raw[r]);
          BYP_RDW: ok = (rdata[g][r] === exp_rdw[r]);
          default: ok = (rdata[g][r] === exp_raw[r]) || (rdata[g][r] === exp_old[r]);
        endcase
        if (!ok) begin
          failures++;
          if (failures < 12)
            $display("cycle %0d cfg %0d port %0d: read %h, expected raw %h rdw %h old %h",
                     c, g, r, rdata[g][r], exp_raw[r], exp_rdw[r], exp_old[r]);
        end
      end
    end
  endtask

  // Work out the expected words for the inputs now on the ports, then
  // commit this cycle's writes to the model.
  task automatic commit_cycle();
    logic [W-1:0] mem_now [D];
    mem_now = mem;
    for (int k = 0; k < NW; k++)
      for (int j = 0; j < NW; j++)
        if (j != k && we[k] && last_we[j] && waddr[k] == last_waddr[j]) n_waw++;
    for (int r = 0; r < NR; r++) begin
      exp_raw[r] = mem[raddr[r]];
      exp_old[r] = mem_prev[raddr[r]];
      n_bank[own[raddr[r]]]++;
      for (int k = 0; k < NW; k++) if (last_we[k] && last_waddr[k] == raddr[r]) n_raw++;
    end
    for (int k = 0; k < NW; k++) if (we[k]) begin
      mem_now[waddr[k]] = wdata[k];
      own[waddr[k]] = 2'(k);
    end
    for (int r = 0; r < NR; r++) begin
      exp_rdw[r] = mem_now[raddr[r]];
      for (int k = 0; k < NW; k++) if (we[k] && waddr[k] == raddr[r]) n_rdw++;
    end
    mem_prev   = mem;
    mem        = mem_now;
    last_we    = we;
    last_waddr = waddr;
    have_exp   = 1'b1;
  endtask

  initial begin
    int unsigned nwr;
    logic clash;
    $readmemh(INIT_FILE, mem);
    for (int a = 0; a < D; a++) begin
      checks++;
      if (mem[a] !== W'(a * 'h9E37 + 'h1234)) begin failures++; $display("init file word %0d is %h", a, mem[a]); end
      mem_prev[a] = mem[a];
      own[a] = '0;
    end
    for (int k = 0; k < NW; k++) begin n_bank[k] = 0; last_we[k] = 1'b0; last_waddr[k] = '0; end
    for (int r = 0; r < NR; r++) raddr[r] = '0;
    idle_ports();
    have_exp = 1'b0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Initial contents: read every address once, NR per cycle.
    for (int a = 0; a < D; a += NR) begin
      @(negedge clk);
      check_reads(-1);
      for (int r = 0; r < NR; r++) raddr[r] = AW'(a + r);
      commit_cycle();
      n_init += NR;
    end

    // Directed: the two-port example.
    @(negedge clk);
    idle_ports();
    we[0] = 1'b1; waddr[0] = AW'(3); wdata[0] = W'('h8C);
    we[1] = 1'b1; waddr[1] = AW'(1); wdata[1] = W'('h24);
    commit_cycle();
    repeat (2) begin
      @(negedge clk);
      check_reads(-1);
      idle_ports();
      commit_cycle();
    end
    @(negedge clk);
    check_reads(-1);
    raddr[0] = AW'(1); raddr[1] = AW'(3);
    commit_cycle();
    @(negedge clk);
    check_reads(-1);
    for (int g = 0; g < NCFG; g++) begin
      checks += 2;
      if (rdata[g][0] !== W'('h24)) begin failures++; $display("cfg %0d: address 1 read %h, expected 24", g, rdata[g][0]); end
      if (rdata[g][1] !== W'('h8C)) begin failures++; $display("cfg %0d: address 3 read %h, expected 8c", g, rdata[g][1]); end
    end
    we[1] = 1'b1; waddr[1] = AW'(3); wdata[1] = W'('h5A);
    commit_cycle();
    repeat (3) begin
      @(negedge clk);
      check_reads(-1);
      idle_ports();
      commit_cycle();
    end
    for (int g = 0; g < NCFG; g++) begin
      checks++;
      if (rdata[g][1] !== W'('h5A)) begin failures++; $display("cfg %0d: address 3 read %h after overwrite, expected 5a", g, rdata[g][1]); end
    end

    // Random phase.
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      check_reads(c);
      nwr = 0;
      for (int k = 0; k < NW; k++) begin
        we[k]    = ($urandom_range(0, 2) != 0);
        waddr[k] = AW'($urandom_range(0, D - 1));
        wdata[k] = W'($urandom);
        clash = 1'b0;
        for (int j = 0; j < k; j++) if (we[j] && waddr[j] == waddr[k]) clash = 1'b1;
        if (clash) we[k] = 1'b0;
        if (we[k]) nwr++;
      end
      if (nwr == NW) n_allw++;
      for (int r = 0; r < NR; r++) begin
        case ($urandom_range(0, 3))
          0: raddr[r] = waddr[$urandom_range(0, NW - 1)];
          1: raddr[r] = last_waddr[$urandom_range(0, NW - 1)];
          default: raddr[r] = AW'($urandom_range(0, D - 1));
        endcase
      end
      commit_cycle();
    end
    @(negedge clk);
    check_reads(NCYC);

    for (int k = 0; k < NW; k++) begin
      checks++;
      if (n_bank[k] == 0) begin failures++; $display("coverage: bank %0d never served a read", k); end
    end
    checks += 5;
    if (n_init != D) begin failures++; $display("coverage: initial contents read %0d of %0d", n_init, D); end
    if (n_raw == 0)  begin failures++; $display("coverage: no read-after-write"); end
    if (n_rdw == 0)  begin failures++; $display("coverage: no read-during-write"); end
    if (n_waw == 0)  begin failures++; $display("coverage: no back-to-back cross-port writes"); end
    if (n_allw == 0) begin failures++; $display("coverage: never all ports writing"); end
    $display("reads per bank %0d %0d %0d %0d; read-after-write %0d, read-during-write %0d, back-to-back writes %0d, all-port writes %0d",
             n_bank[0], n_bank[1], n_bank[2], n_bank[3], n_raw, n_rdw, n_waw, n_allw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
