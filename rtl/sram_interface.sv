// sram_interface: the FPGA's side of the four SRAM banks, combining the
// in-queue interface (bank 0), the scratchpad interface (banks 1 and 2) and
// the out-queue interface (bank 3) of Fig. 6.
//
// Four agents share the banks: the message controller (agent 0), vector port
// A (agent 1), vector port B (agent 2) and vector port C (agent 3). Each agent
// presents at most one access per clock, tagged with its bank. Every bank is
// single ported, so per bank and per clock one access is granted, by fixed
// priority controller > port C > port A > port B; the others wait. An access
// to a bank the FPGA does not currently own (own[b] low) is never granted.
// Grants are combinational. A granted read returns its data to the agent one
// clock later, with rvalid. Agents on different banks proceed in the same
// clock, which is what lets ports A, B and C each move one word per clock.
// Bank ownership and single-ported banks follow the document; the priority
// order is this design's choice.
module sram_interface
  import asan_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [NBANKS-1:0] own,
  input  agent_req_t areq   [4],
  output logic       agnt   [4],
  output logic       arvalid[4],
  output word_t      ardata [4],
  output sram_req_t  breq   [NBANKS],
  input  word_t      brdata [NBANKS]
);

  // priority order of agents: controller, port C, port A, port B
  localparam int unsigned PRIO [4] = '{0, 3, 1, 2};

  logic  rd_q   [4];
  bank_t bank_q [4];

  always_comb begin
    for (int b = 0; b < NBANKS; b++) breq[b] = '0;
    for (int a = 0; a < 4; a++) agnt[a] = 1'b0;
    for (int b = 0; b < NBANKS; b++) begin
      if (own[b]) begin
        for (int p = 0; p < 4; p++) begin
          if (!breq[b].en && areq[PRIO[p]].en && areq[PRIO[p]].bank == bank_t'(b)) begin
            agnt[PRIO[p]]  = 1'b1;
            breq[b].en     = 1'b1;
            breq[b].we     = areq[PRIO[p]].we;
            breq[b].addr   = areq[PRIO[p]].addr;
            breq[b].wdata  = areq[PRIO[p]].wdata;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < 4; a++) begin
        rd_q[a]   <= 1'b0;
        bank_q[a] <= '0;
      end
    end else begin
      for (int a = 0; a < 4; a++) begin
        rd_q[a]   <= agnt[a] && !areq[a].we;
        bank_q[a] <= areq[a].bank;
      end
    end
  end

  always_comb begin
    for (int a = 0; a < 4; a++) begin
      arvalid[a] = rd_q[a];
      ardata[a]  = brdata[bank_q[a]];
    end
  end

endmodule
