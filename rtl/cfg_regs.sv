// cfg_regs: the address-monitoring and mapping registers of one scratchpad
// controller.
//
// For each vtxProp the graph framework writes its start address, the size of
// its primitive type and its stride; it also writes how many of the
// (reordered, most-connected-first) vertices live in the scratchpads, the
// chunk size of the interleaved mapping and the number of vtxProps in use.
// These registers, their meaning and the fact that the framework writes them
// once at the start of a run follow the design. The register map (see
// omega_pkg), the derived fields and the reset values are this
// implementation's: the block also precomputes, for the monitor unit, each
// vtxProp's end address (start + nvert*stride) and, for the line layout, each
// Prop's byte offset inside a scratchpad line (Props packed in order).
//
// Interface: a one-cycle write strobe cfg_we with a word address and 64-bit
// data. Writes to addresses this block does not own are ignored (the PISC
// listens on the same bus). cfg is registered: it changes the cycle after
// the write; the derived fields follow one cycle later still.
module cfg_regs
  import omega_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  logic [7:0]   cfg_addr,
  input  logic [63:0]  cfg_wdata,
  output cfg_t         cfg
);

  logic [MAX_PROPS-1:0][ADDR_W-1:0] start_q;
  logic [MAX_PROPS-1:0][3:0]        tsize_q;
  logic [MAX_PROPS-1:0][7:0]        stride_q;
  logic [VID_W:0]                   nvert_q, chunk_q;
  logic [PROP_W-1:0]                nprops_q;
  logic [MAX_PROPS-1:0][ADDR_W-1:0] end_q;
  logic [MAX_PROPS-1:0][3:0]        off_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q  <= '0;
      tsize_q  <= '0;
      stride_q <= '0;
      nvert_q  <= '0;        // nothing mapped until configured
      chunk_q  <= (VID_W+1)'(1);
      nprops_q <= '0;
    end else if (cfg_we) begin
      for (int k = 0; k < MAX_PROPS; k++) begin
        if (cfg_addr == CFG_START  + 8'(k)) start_q[k]  <= cfg_wdata[ADDR_W-1:0];
        if (cfg_addr == CFG_TSIZE  + 8'(k)) tsize_q[k]  <= cfg_wdata[3:0];
        if (cfg_addr == CFG_STRIDE + 8'(k)) stride_q[k] <= cfg_wdata[7:0];
      end
      if (cfg_addr == CFG_NVERT)  nvert_q  <= cfg_wdata[VID_W:0];
      if (cfg_addr == CFG_CHUNK)  chunk_q  <= (cfg_wdata[VID_W:0] == '0) ? (VID_W+1)'(1)
                                                                          : cfg_wdata[VID_W:0];
      if (cfg_addr == CFG_NPROPS) nprops_q <= cfg_wdata[PROP_W-1:0];
    end
  end

  // Derived fields, registered to keep the multiply off the request path.
  logic [MAX_PROPS-1:0][3:0] off_d;
  logic [3:0] off_acc;
  always_comb begin
    off_acc = '0;
    for (int k = 0; k < MAX_PROPS; k++) begin
      off_d[k] = off_acc;
      off_acc  = off_acc + 4'(tsize_q[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      end_q <= '0;
      off_q <= '0;
    end else begin
      for (int k = 0; k < MAX_PROPS; k++)
        end_q[k] <= start_q[k] + ADDR_W'(nvert_q) * ADDR_W'(stride_q[k]);
      off_q <= off_d;
    end
  end

  always_comb begin
    cfg.start_addr = start_q;
    cfg.type_size  = tsize_q;
    cfg.stride     = stride_q;
    cfg.prop_off   = off_q;
    cfg.end_addr   = end_q;
    cfg.nvert      = nvert_q;
    cfg.chunk      = chunk_q;
    cfg.nprops     = nprops_q;
  end

endmodule
