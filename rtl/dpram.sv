// dpram: simple dual-ported SRAM block, the building block of every bank.
//
// One write port and one read port on a common clock, as an FPGA block RAM
// (for example an M20K) offers them. The write is committed at the clock
// edge; the read address is registered at the clock edge and the word
// appears on rdata one cycle later (read latency 1). A read issued in the
// cycle after a write to the same address sees the new word.
//
// A read issued in the same cycle as a write to the same address returns
// the old word, unless RDW is set: then the block forwards the word being
// written (new data read-during-write), which the memory needs on the
// feedback ports of its live-value table and for its read-during-write mode.
// The memory is built from such blocks as the method prescribes; the
// registered read, the forwarding logic and the absence of a read enable
// (every cycle is a read) are choices of this implementation.
//
// The array starts at all zeros (the FPGA's power-up contents), then, if
// INIT_FILE names a file, is loaded from it with $readmemh (initial
// contents of the block RAM).
module dpram #(
  parameter int unsigned W   = 32,     // word width in bits
  parameter int unsigned D   = 32768,  // depth in words
  parameter bit          RDW = 1'b0,   // forward new data on read-during-write
  parameter string       INIT_FILE = "" // optional $readmemh file of initial words
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(D)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  input  logic [$clog2(D)-1:0] raddr,
  output logic [W-1:0]         rdata
);

  logic [W-1:0] mem [D];
  logic [W-1:0] mem_q;    // word read from the array
  logic [W-1:0] fwd_q;    // word written in the same cycle as the read
  logic         fwd_sel;  // forward fwd_q instead of mem_q

  initial begin
    for (int unsigned i = 0; i < D; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    mem_q <= mem[raddr];
  end

  if (RDW) begin : g_rdw
    always_ff @(posedge clk) begin
      fwd_sel <= we && (waddr == raddr);
      fwd_q   <= wdata;
    end
  end else begin : g_no_rdw
    assign fwd_sel = 1'b0;
    assign fwd_q   = '0;
  end

  assign rdata = fwd_sel ? fwd_q : mem_q;

endmodule
