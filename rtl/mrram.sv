// mrram: one-write / NR-read RAM built by bank replication.
//
// Each read port gets its own copy of a dual-ported SRAM block (dpram); all
// copies share the single write port, so they always hold the same words.
// This is how every bank of the multi-ported memory is built: data banks are
// 1W/nR, and live-value-table banks are 1W/(nR+nW-1).
//
// Timing is that of dpram: writes commit at the clock edge, each read port
// has a latency of one cycle. Bit r of RDW turns on new-data
// read-during-write forwarding for read port r only. INIT_FILE, if given,
// loads every copy with the same initial words.
//
// Building multiple read ports by replication follows the method; the
// per-port forwarding mask is a choice of this implementation.
module mrram #(
  parameter int unsigned   W   = 32,    // word width in bits
  parameter int unsigned   D   = 32768, // depth in words
  parameter int unsigned   NR  = 4,     // number of read ports
  parameter bit [NR-1:0]   RDW = '0,    // per read port: forward on read-during-write
  parameter string         INIT_FILE = "" // optional initial contents of every copy
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(D)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  input  logic [$clog2(D)-1:0] raddr [NR],
  output logic [W-1:0]         rdata [NR]
);

  for (genvar r = 0; r < NR; r++) begin : g_copy
    dpram #(.W(W), .D(D), .RDW(RDW[r]), .INIT_FILE(INIT_FILE)) u_dpram (
      .clk  (clk),
      .we   (we),
      .waddr(waddr),
      .wdata(wdata),
      .raddr(raddr[r]),
      .rdata(rdata[r])
    );
  end

endmodule
