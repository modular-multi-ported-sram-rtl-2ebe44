// ilvt_bin: binary-coded invalidation live-value table (I-LVT).
//
// For every address the table tells which of the NW write ports wrote it
// last, so that the read multiplexers can pick the data bank that holds the
// live value. It is built only of SRAM: one 1W/(NR+NW-1)R bank per write
// port, each ceil(log2 NW) bits wide.
//
// Write port k writes only its own bank. The word it stores is its bank ID
// XOR the words the other NW-1 banks hold at the same address:
//     bank_k[a] <= k ^ (XOR over i != k of bank_i[a])
// so afterwards the XOR of all NW banks at a equals k, and every earlier
// writer's ID is invalidated. A read port XORs the NW banks' words at its
// address to recover the ID of the last writer.
//
// Ports of each bank: read ports 0..NR-1 serve the memory's read ports
// (output ports); read ports NR..NR+NW-2 are feedback ports. Feedback port p
// of bank i is read at the write address of writer j = (p < i) ? p : p+1.
//
// Timing: the feedback read for a write issued in cycle t is made at the
// clock edge ending cycle t; the bank itself is written one cycle later,
// with the write enable and address delayed by one register. The feedback
// ports forward data written in the same cycle (read-during-write), so a
// write from another port to the same address in the next cycle already
// sees this write. rbanksel is valid one cycle after raddr is presented.
// OUT_RDW turns on the same forwarding for the output ports: a read issued
// one cycle after a write then already names the new writer. Without it the
// table lags one further cycle behind. Writes from two ports to one address
// in the same cycle are not allowed.
//
// The XOR feedback and output functions, the per-bank constant IDs and the
// delayed write follow the I-LVT method. Write enables, forwarding, the
// synchronous reset (it clears only the delayed write enables, not the
// table) and the all-zero initial contents (which make bank 0 the initial
// owner of every address) are choices of this implementation.
module ilvt_bin
  import mpram_pkg::*;
#(
  parameter int unsigned NW      = 4,      // write ports (banks)
  parameter int unsigned NR      = 4,      // read ports
  parameter int unsigned D       = 32768,  // depth in words
  parameter bit          OUT_RDW = 1'b1,   // forwarding on the output ports
  localparam int unsigned AW     = $clog2(D),
  localparam int unsigned BW     = bank_id_w(NW)
) (
  input  logic          clk,
  input  logic          rst,     // synchronous, clears the delayed write enables
  input  logic          we       [NW],
  input  logic [AW-1:0] waddr    [NW],
  input  logic [AW-1:0] raddr    [NR],
  output logic [BW-1:0] rbanksel [NR]
);

  localparam int unsigned NP = NR + NW - 1;  // read ports of one bank
  localparam bit [NP-1:0] RDW_MASK = {{(NW-1){1'b1}}, {NR{OUT_RDW}}};

  logic          we_q    [NW];
  logic [AW-1:0] waddr_q [NW];
  logic [BW-1:0] wdata   [NW];
  logic [AW-1:0] baddr   [NW][NP];
  logic [BW-1:0] bdata   [NW][NP];
  // fbd[i][j]: bank i's word at writer j's address (j != i)
  logic [BW-1:0] fbd     [NW][NW];

  initial begin
    if (NW < 2) $error("ilvt_bin needs at least two write ports");
  end

  always_ff @(posedge clk) begin
    for (int unsigned k = 0; k < NW; k++) we_q[k] <= rst ? 1'b0 : we[k];
    waddr_q <= waddr;
  end

  for (genvar i = 0; i < NW; i++) begin : g_bank
    for (genvar r = 0; r < NR; r++) begin : g_out
      assign baddr[i][r] = raddr[r];
    end
    for (genvar p = 0; p < NW - 1; p++) begin : g_fb
      localparam int unsigned J = (p < i) ? p : p + 1;
      assign baddr[i][NR+p] = waddr[J];
      assign fbd[i][J]      = bdata[i][NR+p];
    end
    assign fbd[i][i] = '0;

    mrram #(.W(BW), .D(D), .NR(NP), .RDW(RDW_MASK)) u_bank (
      .clk  (clk),
      .we   (we_q[i]),
      .waddr(waddr_q[i]),
      .wdata(wdata[i]),
      .raddr(baddr[i]),
      .rdata(bdata[i])
    );
  end

  // Feedback function: own ID XOR the other banks' words.
  always_comb begin
    for (int unsigned k = 0; k < NW; k++) begin
      wdata[k] = BW'(k);
      for (int unsigned i = 0; i < NW; i++) begin
        if (i != k) wdata[k] = wdata[k] ^ fbd[i][k];
      end
    end
  end

  // Output function: XOR of all banks' words at the read address.
  always_comb begin
    for (int unsigned r = 0; r < NR; r++) begin
      rbanksel[r] = '0;
      for (int unsigned i = 0; i < NW; i++) begin
        rbanksel[r] = rbanksel[r] ^ bdata[i][r];
      end
    end
  end

endmodule
