// cpld_bank_arbiter: bank arbitration and switching of the FPGA card
// (the CPLD and the "Control & Switching" block of the card).
//
// Each of the four single-ported SRAM banks is owned either by the FPGA or by
// the host side of the card (the PCI bus, through which the host CPU and the
// network interface reach the card), or by nobody. A side asks for a bank by
// holding its request line high and gives it back by lowering it. A free bank
// goes to the side that asked first; ownership is exclusive and is kept until
// the owner lets go, at which point a waiting request of the other side wins.
// When both sides ask for a free bank in the same clock the FPGA wins.
// Grants are registered: a request seen at one clock edge is granted at the
// next. The switch connects each bank's port to its owner's access bundle and
// returns the bank's read data to both sides. Earliest-request exclusive
// ownership is the document's; the request/release handshake, the tie rule
// and the timing are this design's choice.
module cpld_bank_arbiter
  import asan_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // FPGA side
  input  logic [NBANKS-1:0] fpga_req,
  output logic [NBANKS-1:0] fpga_gnt,
  input  sram_req_t fpga_mem [NBANKS],
  // host / PCI side
  input  logic [NBANKS-1:0] host_req,
  output logic [NBANKS-1:0] host_gnt,
  input  sram_req_t host_mem [NBANKS],
  // SRAM banks
  output sram_req_t bank_mem [NBANKS]
);

  typedef enum logic [1:0] {OWN_NONE, OWN_FPGA, OWN_HOST} owner_e;
  owner_e owner [NBANKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANKS; b++) owner[b] <= OWN_NONE;
    end else begin
      for (int b = 0; b < NBANKS; b++) begin
        unique case (owner[b])
          OWN_NONE: if (fpga_req[b])      owner[b] <= OWN_FPGA;
                    else if (host_req[b]) owner[b] <= OWN_HOST;
          OWN_FPGA: if (!fpga_req[b])     owner[b] <= host_req[b] ? OWN_HOST : OWN_NONE;
          OWN_HOST: if (!host_req[b])     owner[b] <= fpga_req[b] ? OWN_FPGA : OWN_NONE;
          default:                        owner[b] <= OWN_NONE;
        endcase
      end
    end
  end

  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      fpga_gnt[b] = (owner[b] == OWN_FPGA);
      host_gnt[b] = (owner[b] == OWN_HOST);
      unique case (owner[b])
        OWN_FPGA: bank_mem[b] = fpga_mem[b];
        OWN_HOST: bank_mem[b] = host_mem[b];
        default:  bank_mem[b] = '0;
      endcase
    end
  end

  for (genvar b = 0; b < NBANKS; b++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) !(fpga_gnt[b] && host_gnt[b]))
      else $error("cpld_bank_arbiter: bank %0d granted to both sides", b);
  end

endmodule
