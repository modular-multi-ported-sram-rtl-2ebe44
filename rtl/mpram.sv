// mpram: modular multi-ported SRAM-based memory with NW write and NR read
// ports, built only of simple dual-ported SRAM blocks.
//
// Structure (live-value-table method with an SRAM-based invalidation LVT):
//   * one data bank per write port, each a 1W/NR RAM (mrram, i.e. NR copies
//     of a dual-ported block). Write port k writes only data bank k.
//   * an invalidation live-value table (ilvt_1ht or ilvt_bin, chosen by LVT)
//     that records, per address, which write port wrote it last.
//   * per read port, a multiplexer (rdmux) that returns the word of the
//     bank the table names.
//
// Interface: per write port we/waddr/wdata, per read port raddr/rdata, one
// clock, and a synchronous reset that only clears the table's delayed write
// enables (memory contents are never reset). The memory starts at all zeros
// or, when INIT_FILE names a $readmemh file, with the words of that file:
// every data bank is loaded with it and the table starts with every address
// owned by bank 0, so the reads return the file's words. Every cycle
// every read port reads. Two write ports must not write one address in the
// same cycle (checked by an assertion).
//
// Timing: a write presented in cycle t reaches its data bank at the edge
// ending cycle t and the table one edge later. A read presented in cycle t
// returns its word in cycle t+1 (latency 1). What a read returns around a
// write to the same address depends on BYP:
//   BYP_NON  read in cycle t+1 may return the old word; read in cycle t
//            returns the old word.
//   BYP_RAW  read in cycle t+1 returns the new word (table output ports
//            forward the write being committed).
//   BYP_RDW  as BYP_RAW, and a read in cycle t returns the new word too: the
//            read address is compared with the write addresses, a match
//            overrides the table's choice, and the data banks forward the
//            word being written.
//
// The bank structure, the SRAM-only table and its two codings follow the
// method; the default sizes are the largest configuration of its
// evaluation (4 write, 4 read ports, 32768 words of 32 bits). The bypass
// modes and the initial contents follow its bypassing and initializing
// features; how they are built, the file format, the write enables and the
// reset are choices of this implementation.
module mpram
  import mpram_pkg::*;
#(
  parameter int unsigned NW  = 4,        // write ports
  parameter int unsigned NR  = 4,        // read ports
  parameter int unsigned W   = 32,       // word width
  parameter int unsigned D   = 32768,    // depth in words
  parameter lvt_e        LVT = LVT_1HT,  // table coding
  parameter byp_e        BYP = BYP_RAW,  // bypass mode
  parameter string       INIT_FILE = "", // optional $readmemh file of initial words
  localparam int unsigned AW = $clog2(D),
  localparam int unsigned BW = bank_id_w(NW)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we    [NW],
  input  logic [AW-1:0] waddr [NW],
  input  logic [W-1:0]  wdata [NW],
  input  logic [AW-1:0] raddr [NR],
  output logic [W-1:0]  rdata [NR]
);

  localparam bit          OUT_RDW  = (BYP != BYP_NON);
  localparam bit [NR-1:0] DATA_RDW = (BYP == BYP_RDW) ? '1 : '0;

  logic [W-1:0]  bank_rdata [NW][NR];
  logic [BW-1:0] lvt_sel    [NR];
  logic [BW-1:0] sel        [NR];

  // Data banks: one 1W/NR RAM per write port.
  for (genvar k = 0; k < NW; k++) begin : g_data
    mrram #(.W(W), .D(D), .NR(NR), .RDW(DATA_RDW), .INIT_FILE(INIT_FILE)) u_bank (
      .clk  (clk),
      .we   (we[k]),
      .waddr(waddr[k]),
      .wdata(wdata[k]),
      .raddr(raddr),
      .rdata(bank_rdata[k])
    );
  end

  // Invalidation live-value table.
  if (LVT == LVT_1HT) begin : g_lvt
    ilvt_1ht #(.NW(NW), .NR(NR), .D(D), .OUT_RDW(OUT_RDW)) u_lvt (
      .clk     (clk),
      .rst     (rst),
      .we      (we),
      .waddr   (waddr),
      .raddr   (raddr),
      .rbanksel(lvt_sel)
    );
  end else begin : g_lvt
    ilvt_bin #(.NW(NW), .NR(NR), .D(D), .OUT_RDW(OUT_RDW)) u_lvt (
      .clk     (clk),
      .rst     (rst),
      .we      (we),
      .waddr   (waddr),
      .raddr   (raddr),
      .rbanksel(lvt_sel)
    );
  end

  // Read-during-write override: a read that hits a write of the same cycle
  // takes the writing port's bank.
  if (BYP == BYP_RDW) begin : g_rdw
    logic          hit_q    [NR];
    logic [BW-1:0] hit_id_q [NR];
    always_ff @(posedge clk) begin
      for (int unsigned r = 0; r < NR; r++) begin
        hit_q[r]    <= 1'b0;
        hit_id_q[r] <= '0;
        for (int unsigned k = 0; k < NW; k++) begin
          if (!rst && we[k] && waddr[k] == raddr[r]) begin
            hit_q[r]    <= 1'b1;
            hit_id_q[r] <= BW'(k);
          end
        end
      end
    end
    for (genvar r = 0; r < NR; r++) begin : g_sel
      assign sel[r] = hit_q[r] ? hit_id_q[r] : lvt_sel[r];
    end
  end else begin : g_no_rdw
    assign sel = lvt_sel;
  end

  rdmux #(.NW(NW), .NR(NR), .W(W)) u_rdmux (
    .bank_rdata(bank_rdata),
    .sel       (sel),
    .rdata     (rdata)
  );

  // Rule of the write ports: no two ports write one address in one cycle.
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int unsigned a = 0; a < NW; a++) begin
        for (int unsigned b = a + 1; b < NW; b++) begin
          assert (!(we[a] && we[b] && waddr[a] == waddr[b]))
            else $error("mpram: write ports %0d and %0d write address %0h in one cycle",
                        a, b, waddr[a]);
        end
      end
    end
  end

endmodule
