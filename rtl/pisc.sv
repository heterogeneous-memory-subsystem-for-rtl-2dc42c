// pisc: Processing-in-Scratchpad engine, the atomic-operation unit beside
// each scratchpad.
//
// Cores offload an atomic vtxProp update (for example PageRank's
// next_pagerank[d] += contribution, or SSSP's min on ShortestLen plus setting
// Visited) to the PISC of the destination vertex's home scratchpad and move
// on. The scratchpad controller reads the vertex's line, hands it to the PISC
// with the operand carried by the request, the PISC runs the micro-program of
// the request's operation type on it, and the line is written back. While it
// runs, the controller holds back every other request for that vertex, so the
// read-modify-write is atomic.
//
// Inside, as in the design: microcode registers, written by the framework
// through the configuration bus, a sequencer that interprets the command and
// steps through the microcode, and the ALU engine (pisc_alu). The PISC also
// maintains the active list: for a dense list it sets the vertex's active bit
// in the scratchpad line, for a sparse list it emits the vertex ID towards the
// L1 data cache (push_*). The micro-op format, four 64-bit working registers
// (R0 starts as the operand, R1..R3 at zero), a single predicate flag, four
// global registers (constants such as "unvisited" or the current round) and
// the per-type entry-point table are this implementation's choices.
//
// Timing: start is accepted when busy is low. Each micro-op takes one cycle
// (a PUSH waits for push_ready); END, or running past the last word, leads to
// one write-back cycle with wb_valid high, after which busy falls.
// Configuration bus: CFG_GLOBAL+i, CFG_ENTRY+t and CFG_UCODE+j of omega_pkg.
module pisc
  import omega_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration bus (microcode registers)
  input  logic                      cfg_we,
  input  logic [7:0]                cfg_addr,
  input  logic [63:0]               cfg_wdata,
  input  cfg_t                      cfg,
  // command from the scratchpad controller
  input  logic                      start,
  input  logic [LINE_W-1:0]         s_line,
  input  logic [MAX_PROPS-1:0]      s_act,
  input  logic [DATA_W-1:0]         s_operand,
  input  logic [OPT_W-1:0]          s_optype,
  input  logic [VID_W-1:0]          s_vid,
  output logic                      busy,
  // write-back of the updated line
  output logic                      wb_valid,
  output logic [LINE_W-1:0]         wb_line,
  output logic [MAX_PROPS-1:0]      wb_act,
  // sparse active list, towards the L1 data cache
  output logic                      push_valid,
  input  logic                      push_ready,
  output logic [VID_W-1:0]          push_vid
);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_WB} state_e;

  logic [UCODE_DEPTH-1:0][UOP_W-1:0] ucode;
  logic [NUM_OPTYPES-1:0][PC_W-1:0]  entry;
  logic [NUM_GLOBALS-1:0][63:0]      glob;

  state_e                 state;
  logic [PC_W-1:0]        pc;
  logic [3:0][63:0]       r;
  logic                   flag;
  logic [LINE_W-1:0]      line_q;
  logic [MAX_PROPS-1:0]   act_q;
  logic [VID_W-1:0]       vid_q;

  uop_t        u;
  logic        en;
  logic [63:0] alu_y;
  logic        alu_f;
  logic [63:0] ra_v, rb_v;
  logic        advance;

  // microcode registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ucode <= '0;
      entry <= '0;
      glob  <= '0;
    end else if (cfg_we) begin
      for (int j = 0; j < UCODE_DEPTH; j++)
        if (cfg_addr == CFG_UCODE + 8'(j)) ucode[j] <= cfg_wdata[UOP_W-1:0];
      for (int t = 0; t < NUM_OPTYPES; t++)
        if (cfg_addr == CFG_ENTRY + 8'(t)) entry[t] <= cfg_wdata[PC_W-1:0];
      for (int i = 0; i < NUM_GLOBALS; i++)
        if (cfg_addr == CFG_GLOBAL + 8'(i)) glob[i] <= cfg_wdata;
    end
  end

  function automatic logic [63:0] size_mask(input logic [3:0] n);
    return (n >= 4'd8) ? '1 : ((64'd1 << (8 * n)) - 64'd1);
  endfunction

  function automatic logic [63:0] get_prop(input logic [LINE_W-1:0] l, input logic [1:0] k,
                                           input logic sx, input cfg_t c);
    logic [63:0] v, m;
    logic [3:0]  n;
    n = (k < 2'(MAX_PROPS)) ? c.type_size[k] : 4'd0;
    m = size_mask(n);
    v = 64'(l >> (8 * ((k < 2'(MAX_PROPS)) ? c.prop_off[k] : 4'd0))) & m;
    if (sx && n != 4'd0 && n < 4'd8 && v[8*n-1]) v = v | ~m;
    return v;
  endfunction

  function automatic logic [LINE_W-1:0] put_prop(input logic [LINE_W-1:0] l, input logic [1:0] k,
                                                 input logic [63:0] v, input cfg_t c);
    logic [LINE_W-1:0] m;
    logic [3:0]        o;
    if (k >= 2'(MAX_PROPS)) return l;
    o = c.prop_off[k];
    m = LINE_W'(size_mask(c.type_size[k])) << (8 * o);
    return (l & ~m) | ((LINE_W'(v) << (8 * o)) & m);
  endfunction

  assign u    = uop_t'(ucode[pc]);
  assign ra_v = r[u.ra];
  assign rb_v = r[u.rb];
  assign en   = (u.pred == PR_AL) || (u.pred == PR_T && flag) || (u.pred == PR_F && !flag);

  pisc_alu u_alu (.fn(u.fn), .a(ra_v), .b(rb_v), .y(alu_y), .flag(alu_f));

  // a PUSH waits until the sparse-list port takes the vertex ID
  assign advance    = !(en && u.op == U_PUSH && !push_ready);
  assign busy       = (state != S_IDLE);
  assign wb_valid   = (state == S_WB);
  assign wb_line    = line_q;
  assign wb_act     = act_q;
  assign push_valid = (state == S_EXEC) && en && (u.op == U_PUSH);
  assign push_vid   = vid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pc     <= '0;
      r      <= '0;
      flag   <= 1'b0;
      line_q <= '0;
      act_q  <= '0;
      vid_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_EXEC;
          pc     <= entry[s_optype];
          r      <= '0;
          r[0]   <= s_operand;
          flag   <= 1'b0;
          line_q <= s_line;
          act_q  <= s_act;
          vid_q  <= s_vid;
        end
        S_EXEC: begin
          if (en) begin
            unique case (u.op)
              U_END:    state <= S_WB;
              U_LDP:    r[u.rd] <= get_prop(line_q, u.k, u.sx, cfg);
              U_LDG:    r[u.rd] <= glob[u.k];
              U_ALU:    r[u.rd] <= alu_y;
              U_CMP:    flag    <= alu_f;
              U_STP:    line_q  <= put_prop(line_q, u.k, ra_v, cfg);
              U_SETACT: if (u.k < 2'(MAX_PROPS)) act_q[u.k] <= 1'b1;
              U_PUSH:   ;
              default:  ;
            endcase
          end
          if (advance && !(en && u.op == U_END)) begin
            if (pc == PC_W'(UCODE_DEPTH - 1)) state <= S_WB;
            pc <= pc + 1'b1;
          end
        end
        S_WB: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
