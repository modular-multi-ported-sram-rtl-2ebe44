// ilvt_1ht: one-hot-coded invalidation live-value table (I-LVT).
//
// For every address the table tells which of the NW write ports wrote it
// last. It is built only of SRAM: one 1W/(NR+NW-1)R bank per write port,
// each NW-1 bits wide. Every pair of banks (i, j), i < j, shares one
// condition: bit j-1 of bank i and bit i of bank j. Bank i "wins" the pair
// when the two bits are equal, bank j wins when they differ. Writer k
// rewrites all NW-1 of its bits so that it wins every pair it belongs to
// (feedback function), for bit position n of bank k:
//     n <  k : bank_k<n> <= ~bank_n[a]<k-1>   (make the pair (n,k) differ)
//     n >= k : bank_k<n> <=  bank_{n+1}[a]<k> (make the pair (k,n+1) equal)
// Exactly one bank then wins all its pairs. A read port evaluates the same
// function on the words read at its address and compares it with each
// bank's own word: the bank whose word matches is the last writer (output
// function). The one-hot result is encoded into a bank index.
//
// Each bank is one NR-read RAM of NW-1 bits for the memory's read ports
// plus NW-1 feedback copies of one bit each. Feedback copy p of bank i is
// read at the write address of writer j = (p < i) ? p : p+1, and writer j
// needs exactly one bit of bank i, which is always bit p (bit j-1 when
// i < j, bit j when i > j); so copy p stores only bit p. A bank therefore
// holds (NR+1)*(NW-1) bits per address.
//
// Timing: as ilvt_bin. The feedback read for a write issued in cycle t is
// made at the edge ending cycle t and the bank is written one cycle later
// through a delayed enable and address; feedback copies forward same-cycle
// writes; rbanksel is valid one cycle after raddr. OUT_RDW turns on
// forwarding on the output ports. Writes from two ports to one address in
// the same cycle are not allowed.
//
// The condition coding, feedback and output functions and the delayed write
// follow the one-hot I-LVT method, and the one-bit feedback copies give its
// SRAM count d*(nR+1)*nW*(nW-1). Write enables, forwarding, the binary
// encoding of the result, the synchronous reset (it clears only the delayed
// write enables, not the table) and the all-zero initial contents (under
// which bank 0 wins every pair, so it owns every address at start) are
// choices of this implementation.
module ilvt_1ht
  import mpram_pkg::*;
#(
  parameter int unsigned NW      = 4,      // write ports (banks)
  parameter int unsigned NR      = 4,      // read ports
  parameter int unsigned D       = 32768,  // depth in words
  parameter bit          OUT_RDW = 1'b1,   // forwarding on the output ports
  localparam int unsigned AW     = $clog2(D),
  localparam int unsigned BW     = bank_id_w(NW),
  localparam int unsigned LW     = (NW > 1) ? NW - 1 : 1
) (
  input  logic          clk,
  input  logic          rst,     // synchronous, clears the delayed write enables
  input  logic          we       [NW],
  input  logic [AW-1:0] waddr    [NW],
  input  logic [AW-1:0] raddr    [NR],
  output logic [BW-1:0] rbanksel [NR]
);

  logic          we_q    [NW];
  logic [AW-1:0] waddr_q [NW];
  logic [LW-1:0] wdata   [NW];
  logic [LW-1:0] bdata   [NW][NR];  // bank i's word for read port r
  // fbb[i][j]: the bit of bank i that writer j needs, at j's address (j != i)
  logic          fbb     [NW][NW];
  logic [NW-1:0] hit     [NR];      // one-hot: bank whose conditions all hold

  initial begin
    if (NW < 2) $error("ilvt_1ht needs at least two write ports");
  end

  always_ff @(posedge clk) begin
    for (int unsigned k = 0; k < NW; k++) we_q[k] <= rst ? 1'b0 : we[k];
    waddr_q <= waddr;
  end

  for (genvar i = 0; i < NW; i++) begin : g_bank
    // Output copies: the whole word, one copy per read port.
    mrram #(.W(LW), .D(D), .NR(NR), .RDW({NR{OUT_RDW}})) u_out (
      .clk  (clk),
      .we   (we_q[i]),
      .waddr(waddr_q[i]),
      .wdata(wdata[i]),
      .raddr(raddr),
      .rdata(bdata[i])
    );
    // Feedback copies: bit p only, always forwarding.
    for (genvar p = 0; p < NW - 1; p++) begin : g_fb
      localparam int unsigned J = (p < i) ? p : p + 1;
      dpram #(.W(1), .D(D), .RDW(1'b1)) u_fb (
        .clk  (clk),
        .we   (we_q[i]),
        .waddr(waddr_q[i]),
        .wdata(wdata[i][p]),
        .raddr(waddr[J]),
        .rdata(fbb[i][J])
      );
    end
    assign fbb[i][i] = 1'b0;
  end

  // Feedback function of bank k: make bank k win every pair it is in.
  always_comb begin
    for (int unsigned k = 0; k < NW; k++) begin
      for (int unsigned n = 0; n < NW - 1; n++) begin
        if (n < k) wdata[k][n] = ~fbb[n][k];
        else       wdata[k][n] =  fbb[n+1][k];
      end
    end
  end

  // Output function: bank k is live where its word equals the feedback
  // function of the other banks' words at the read address.
  always_comb begin
    for (int unsigned r = 0; r < NR; r++) begin
      for (int unsigned k = 0; k < NW; k++) begin
        hit[r][k] = 1'b1;
        for (int unsigned n = 0; n < NW - 1; n++) begin
          if (n < k) hit[r][k] = hit[r][k] & (bdata[k][r][n] != bdata[n][r][k-1]);
          else       hit[r][k] = hit[r][k] & (bdata[k][r][n] == bdata[n+1][r][k]);
        end
      end
    end
  end

  // One-hot to index.
  always_comb begin
    for (int unsigned r = 0; r < NR; r++) begin
      rbanksel[r] = '0;
      for (int unsigned k = 0; k < NW; k++) begin
        if (hit[r][k]) rbanksel[r] = rbanksel[r] | BW'(k);
      end
    end
  end

endmodule
