// sip_prop_prefetcher: the property prefetcher of SIP, beside the P-cache.
//
// It receives the IDs of the active vertices and of their neighbors from the
// structure prefetcher, computes the address of each vertex's property,
// prop_list + ID * size, and sends it to the P-cache as a prefetch, which
// brings the property from the LLC before the processor asks for it.
//
// Interface: two ID inputs with valid/ready (active vertices take priority
// over neighbors when both offer an ID in the same cycle), a FIFO of
// FIFO_DEPTH IDs, and one prefetch output with valid/ready carrying the
// address. The address is formed at the FIFO output, so an ID accepted at
// one edge can leave as a prefetch address in the next cycle. `flush` (a
// restart) drops all IDs not yet sent.
//
// The address formula follows the document. The input FIFO, its depth (the
// depth the document gives the structure prefetcher's FIFOs) and the
// priority order are this design's choices.
module sip_prop_prefetcher
  import sip_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  sip_cfg_t cfg,
  input  logic     flush,
  input  logic     vid_valid,
  output logic     vid_ready,
  input  word_t    vid,
  input  logic     nid_valid,
  output logic     nid_ready,
  input  word_t    nid,
  output logic     pf_valid,
  input  logic     pf_ready,
  output word_t    pf_addr
);

  logic  in_ready;
  word_t id_out;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fill;

  assign vid_ready = in_ready;
  assign nid_ready = in_ready && !vid_valid;

  sip_fifo #(.WIDTH(XLEN), .DEPTH(FIFO_DEPTH)) u_id_fifo (
    .clk, .rst_n, .flush,
    .push_valid(vid_valid || nid_valid), .push_ready(in_ready),
    .push_data(vid_valid ? vid : nid),
    .pop_valid(pf_valid), .pop_ready(pf_ready), .pop_data(id_out),
    .count(fill)
  );

  sip_addr_gen u_prop_addr (
    .base(cfg.prop_list), .index(id_out), .size(cfg.size), .addr(pf_addr)
  );

endmodule
