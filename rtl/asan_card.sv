// asan_card: the FPGA card of an active system-area-network interface.
//
// The card sits on the PCI bus next to the network interface card. Its four
// SRAM banks hold the incoming message queue (bank 0), a 4 MB scratchpad
// (banks 1-2) and the outgoing message queue (bank 3). Hosts and the network
// interface put messages into the incoming queue; the FPGA applies the
// function named in each message to the data in transit and stores, recycles
// or forwards the result by way of the outgoing queue.
//
// This module joins
//   - cpld_bank_arbiter: per-bank ownership between the FPGA and the PCI side
//     and the switch that connects each bank to its owner,
//   - fpga_control_block: message handling, forwarding directory, vector
//     ports A/B/C, function faults,
//   - user_area: the built-in circuit and the user-defined circuits.
// The SRAM chips, the PCI bridge, the network interface and the host are not
// part of this RTL: the SRAM bank ports and the PCI-side ownership handshake
// and access bundles are the ports of this module. Each bank port performs
// the access presented on it (sram_mem[b]) and returns read data on
// sram_rdata[b] one clock later; the same read data is seen by both sides.
// The host learns of a function fault from `func_fault` / `fault_cid` and
// answers with a one-clock `fault_clear` once it has dealt with it.
module asan_card
  import asan_pkg::*;
#(
  parameter int unsigned POLL_INTERVAL = 64,
  parameter int unsigned IQ_SLOTS      = 64,
  parameter int unsigned OQ_SLOTS      = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // PCI side (host CPU and network interface, through the card's PCI bridge)
  input  logic [NBANKS-1:0] host_req,
  output logic [NBANKS-1:0] host_gnt,
  input  sram_req_t host_mem  [NBANKS],
  // SRAM banks
  output sram_req_t sram_mem  [NBANKS],
  input  word_t     sram_rdata[NBANKS],
  // function fault
  output logic      func_fault,
  output cid_t      fault_cid,
  input  logic      fault_clear,
  // monitoring
  output ctl_ev_t   ev
);

  logic [NBANKS-1:0] fpga_req, fpga_gnt;
  sram_req_t         fpga_mem [NBANKS];

  cid_t     sel_cid, query_cid;
  logic     query_present;
  ckt_in_t  ci;
  ckt_out_t co;

  cpld_bank_arbiter u_cpld (
    .clk, .rst_n,
    .fpga_req, .fpga_gnt, .fpga_mem,
    .host_req, .host_gnt, .host_mem,
    .bank_mem(sram_mem)
  );

  fpga_control_block #(
    .POLL_INTERVAL(POLL_INTERVAL), .IQ_SLOTS(IQ_SLOTS), .OQ_SLOTS(OQ_SLOTS)
  ) u_ctrl (
    .clk, .rst_n,
    .bank_req(fpga_req), .bank_gnt(fpga_gnt),
    .mem(fpga_mem), .mem_rdata(sram_rdata),
    .sel_cid, .ci, .co, .query_cid, .query_present,
    .func_fault, .fault_cid, .fault_clear,
    .ev
  );

  user_area u_user (
    .clk, .rst_n, .sel_cid, .ci, .co, .query_cid, .query_present
  );

endmodule
