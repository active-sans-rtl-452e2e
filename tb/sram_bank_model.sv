// sram_bank_model: behavioural model of one single-ported 32-bit SRAM bank
// of the card (2 MB = 512K words at the default AW). An access presented on
// `req` is performed at the clock edge; read data appears on `rdata` one
// clock later and holds until the next read. Contents start at zero;
// the read register starts undefined until the first read.
module sram_bank_model
  import asan_pkg::*;
#(
  parameter int unsigned AW = BANK_AW
) (
  input  logic      clk,
  input  sram_req_t req,
  output word_t     rdata
);
  word_t mem [1 << AW];

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (req.en) begin
      if (req.we) mem[req.addr[AW-1:0]] <= req.wdata;
      else        rdata <= mem[req.addr[AW-1:0]];
    end
  end
endmodule
