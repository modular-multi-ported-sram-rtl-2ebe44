// rdmux: output multiplexers of the multi-ported memory.
//
// For each of the NR read ports, one NW-to-1 multiplexer picks, among the
// words the NW data banks read at that port's address, the word of the bank
// that the live-value table names in sel. Purely combinational; sel and the
// bank words arrive in the same cycle, one cycle after the read address.
// The multiplexers follow the method's structure; the binary-coded select
// (the one-hot table's result is encoded before it) is a choice of this
// implementation.
module rdmux
  import mpram_pkg::*;
#(
  parameter int unsigned NW = 4,   // write ports (data banks)
  parameter int unsigned NR = 4,   // read ports
  parameter int unsigned W  = 32,  // word width
  localparam int unsigned BW = bank_id_w(NW)
) (
  input  logic [W-1:0]  bank_rdata [NW][NR],  // bank i's word for read port r
  input  logic [BW-1:0] sel        [NR],
  output logic [W-1:0]  rdata      [NR]
);

  always_comb begin
    for (int unsigned r = 0; r < NR; r++) begin
      rdata[r] = '0;
      for (int unsigned i = 0; i < NW; i++) begin
        if (sel[r] == BW'(i)) rdata[r] = bank_rdata[i][r];
      end
    end
  end

endmodule
