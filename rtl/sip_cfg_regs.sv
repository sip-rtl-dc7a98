// sip_cfg_regs: the configuration registers of SIP.
//
// The one instruction SIP adds to the ISA carries two operands: the index of
// an added register and the value to put in it. This block holds those
// registers (data size, all-active flag, active range / active list bounds,
// offset, neighbor and property list base addresses, the neighbor and
// property address ranges used by the load/store queue, and the counter
// threshold) and presents them as one struct.
//
// Interface: cfg_we/cfg_idx/cfg_wdata is the decoded instruction. A write
// lands at the next rising edge; `cfg` shows it from then on. `cfg_written`
// pulses for one cycle after every write; the prefetchers take it as the
// signal to (re)start walking the frontier. Writes to an index outside the
// table are ignored. All registers reset to zero.
//
// The register set follows the document. The index encoding, the
// restart-on-write behaviour and the zero reset are this design's choices.
module sip_cfg_regs
  import sip_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_we,
  input  logic [3:0] cfg_idx,
  input  word_t    cfg_wdata,
  output sip_cfg_t cfg,
  output logic     cfg_written
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg         <= '0;
      cfg_written <= 1'b0;
    end else begin
      cfg_written <= 1'b0;
      if (cfg_we && (cfg_idx < 4'(NUM_CFG))) begin
        cfg_written <= 1'b1;
        unique case (cfg_idx_e'(cfg_idx))
          CFG_SIZE:      cfg.size       <= cfg_wdata;
          CFG_ACTIVE:    cfg.all_active <= cfg_wdata[0];
          CFG_ACTIVE1:   cfg.active1    <= cfg_wdata;
          CFG_ACTIVE2:   cfg.active2    <= cfg_wdata;
          CFG_OFF_LIST:  cfg.off_list   <= cfg_wdata;
          CFG_NEI_LIST:  cfg.nei_list   <= cfg_wdata;
          CFG_PROP_LIST: cfg.prop_list  <= cfg_wdata;
          CFG_NEI1:      cfg.nei1       <= cfg_wdata;
          CFG_NEI2:      cfg.nei2       <= cfg_wdata;
          CFG_PROP1:     cfg.prop1      <= cfg_wdata;
          CFG_PROP2:     cfg.prop2      <= cfg_wdata;
          CFG_THRESHOLD: cfg.threshold  <= cfg_wdata;
          default: ;
        endcase
      end
    end
  end

endmodule
