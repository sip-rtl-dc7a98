// sip_req_classifier: address-range check at the end of the load/store queue.
//
// SIP tells property data from other data by address instead of by new load
// and store opcodes. Every request leaving the load/store queue is compared
// with the property range [prop1, prop2): inside it goes to the P-cache,
// outside it goes to the D-cache. The same comparison against the neighbor
// list range [nei1, nei2) marks the processor's edge reads; each accepted
// edge load pulses `edge_read`, which decrements the timeliness counter.
//
// Interface: one request channel in (valid/ready, write enable, address,
// write data), two request channels out. The request is steered
// combinationally and `cpu_ready` is the ready of the chosen target.
//
// The two range checks and what they drive follow the document. Treating
// the end addresses as exclusive, and counting only loads (not stores) in
// the neighbor range as edge reads, are this design's choices.
module sip_req_classifier
  import sip_pkg::*;
(
  input  sip_cfg_t cfg,
  // from the load/store queue
  input  logic  cpu_valid,
  output logic  cpu_ready,
  input  logic  cpu_we,
  input  word_t cpu_addr,
  input  word_t cpu_wdata,
  // to the P-cache
  output logic  pc_valid,
  input  logic  pc_ready,
  output logic  pc_we,
  output word_t pc_addr,
  output word_t pc_wdata,
  // to the D-cache
  output logic  dc_valid,
  input  logic  dc_ready,
  output logic  dc_we,
  output word_t dc_addr,
  output word_t dc_wdata,
  // to the timeliness counter
  output logic  edge_read
);

  logic is_prop, is_nei;

  assign is_prop = (cpu_addr >= cfg.prop1) && (cpu_addr < cfg.prop2);
  assign is_nei  = (cpu_addr >= cfg.nei1)  && (cpu_addr < cfg.nei2);

  assign pc_valid = cpu_valid && is_prop;
  assign dc_valid = cpu_valid && !is_prop;
  assign pc_we    = cpu_we;
  assign dc_we    = cpu_we;
  assign pc_addr  = cpu_addr;
  assign dc_addr  = cpu_addr;
  assign pc_wdata = cpu_wdata;
  assign dc_wdata = cpu_wdata;

  assign cpu_ready = is_prop ? pc_ready : dc_ready;
  assign edge_read = dc_valid && dc_ready && !cpu_we && is_nei;

endmodule
