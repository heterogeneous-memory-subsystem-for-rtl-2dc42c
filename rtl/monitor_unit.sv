// monitor_unit: decides whether a request address falls in the
// scratchpad-resident part of one of the configured vtxProps.
//
// For every vtxProp k the unit checks start_addr[k] <= addr < end_addr[k]
// (end = start + nvert*stride, i.e. only the nvert most-connected vertices are
// resident) and that the offset is a whole number of strides, so that fields
// of a struct that share one stride are told apart. On a match it reports the
// Prop index and the vertex ID = offset / stride. Without a match the request
// belongs to the conventional cache hierarchy and the scratchpad controller
// ignores it. The range test follows the design's address monitoring
// registers; the exact-multiple test, the lowest-index priority when two
// ranges overlap and the arbitrary (non power-of-two) stride divider are this
// implementation's choices.
//
// Purely combinational; cfg comes from cfg_regs.
module monitor_unit
  import omega_pkg::*;
(
  input  cfg_t               cfg,
  input  logic [ADDR_W-1:0]  addr,
  output logic               hit,
  output logic [PROP_W-1:0]  prop,
  output logic [VID_W-1:0]   vid
);

  logic [MAX_PROPS-1:0]             in_k;
  logic [MAX_PROPS-1:0][VID_W-1:0]  vid_k;

  always_comb begin
    for (int k = 0; k < MAX_PROPS; k++) begin
      logic [ADDR_W-1:0] off;
      logic [ADDR_W-1:0] q, r;
      off = addr - cfg.start_addr[k];
      if (cfg.stride[k] != '0) begin
        q = off / ADDR_W'(cfg.stride[k]);
        r = off % ADDR_W'(cfg.stride[k]);
      end else begin
        q = '0;
        r = '1;
      end
      in_k[k]  = (k < int'(cfg.nprops)) && (addr >= cfg.start_addr[k]) &&
                 (addr < cfg.end_addr[k]) && (r == '0);
      vid_k[k] = q[VID_W-1:0];
    end
    hit  = 1'b0;
    prop = '0;
    vid  = '0;
    for (int k = MAX_PROPS-1; k >= 0; k--) begin
      if (in_k[k]) begin
        hit  = 1'b1;
        prop = PROP_W'(k);
        vid  = vid_k[k];
      end
    end
  end

endmodule
