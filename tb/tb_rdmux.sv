// tb_rdmux: self-checking test of the read-port multiplexers.
//
// Random bank words and random valid bank selects for 4 banks and 3 read
// ports; each output must equal the selected bank's word for that port.
module tb_rdmux;
  import mpram_pkg::*;
  localparam int unsigned NW = 4;
  localparam int unsigned NR = 3;
  localparam int unsigned W  = 20;
  localparam int unsigned BW = bank_id_w(NW);
  localparam int unsigned NVEC = 2000;

  logic [W-1:0]  bank_rdata [NW][NR];
  logic [BW-1:0] sel        [NR];
  logic [W-1:0]  rdata      [NR];
  logic          clk = 1'b0;

  int unsigned checks = 0, failures = 0;
  int unsigned seen [NW];

  always #5 clk = ~clk;

  rdmux #(.NW(NW), .NR(NR), .W(W)) dut (.bank_rdata(bank_rdata), .sel(sel), .rdata(rdata));

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NW; i++) seen[i] = 0;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      for (int i = 0; i < NW; i++)
        for (int r = 0; r < NR; r++) bank_rdata[i][r] = W'($urandom);
      for (int r = 0; r < NR; r++) sel[r] = BW'($urandom_range(0, NW - 1));
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        seen[sel[r]]++;
        if (rdata[r] !== bank_rdata[sel[r]][r]) begin
          failures++;
          if (failures < 10) $display("vector %0d port %0d: sel %0d read %h", v, r, sel[r], rdata[r]);
        end
      end
    end
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("coverage: bank %0d never selected", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
