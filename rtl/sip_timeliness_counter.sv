// sip_timeliness_counter: keeps the structure prefetcher a bounded distance
// ahead of the processor.
//
// The signed count is (edges prefetched) - (edges read by the processor).
// It rises by one for each edge prefetch request the structure prefetcher
// sends (`inc`) and falls by one for each edge load the processor issues
// (`dec`). When the prefetcher gives up on a vertex it adds the number of
// neighbors it did not prefetch (`add_valid`/`add_amount`), which brings
// the count back toward the processor's position.
//
//   stall  = count >= threshold : stage 3 must not send another edge request
//   behind = count <  0         : the processor has overtaken the prefetcher;
//                                 stage 3 drops its current vertex
//
// All three updates may happen in the same cycle; the outputs are decoded
// from the registered count. `clear` (a restart) returns it to zero.
//
// The document says the prefetcher stalls when the value "reaches" the
// threshold, while its figure prints "value>threshold"; this design follows
// the text (>=). The counter width CNT_W is this design's choice.
module sip_timeliness_counter
  import sip_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  inc,
  input  logic  dec,
  input  logic  add_valid,
  input  word_t add_amount,
  input  word_t threshold,
  output logic signed [CNT_W-1:0] count,
  output logic  stall,
  output logic  behind
);

  logic signed [CNT_W-1:0] delta;

  always_comb begin
    delta = '0;
    if (inc)       delta = delta + CNT_W'(1);
    if (dec)       delta = delta - CNT_W'(1);
    if (add_valid) delta = delta + $signed(CNT_W'(add_amount));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (clear)  count <= '0;
    else             count <= count + delta;
  end

  // When the count is non-negative an unsigned compare is exact.
  assign behind = count[CNT_W-1];
  assign stall  = !count[CNT_W-1] &&
                  ({{XLEN{1'b0}}, CNT_W'(count)} >= {{CNT_W{1'b0}}, threshold});

endmodule
