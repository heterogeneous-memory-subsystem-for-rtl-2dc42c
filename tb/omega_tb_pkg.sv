// omega_tb_pkg: helpers shared by the OMEGA testbenches: micro-op encoding,
// the micro-programs of four graph algorithms' atomic updates (as a
// source-to-source translator would generate them) and a routine that
// writes them over the configuration bus.
//
// Register use: R0 holds the operand sent with the request (src_data).
// Global registers: G0 = 0xFFFFFFFF ("no parent"), G1 = 1 ("visited").
// Operation types: 0 PageRank (fp add), 1 BFS (claim parent),
// 2 SSSP (signed min + visited), 3 CC (unsigned min).
package omega_tb_pkg;
  import omega_pkg::*;

  localparam int unsigned T_PR = 0, T_BFS = 1, T_SSSP = 2, T_CC = 3;

  function automatic logic [63:0] uop(uop_e op, pred_e pred = PR_AL, fn_e fn = F_MOV,
                                      int rd = 0, int ra = 0, int rb = 0, int k = 0, bit sx = 0);
    uop_t u;
    u.op = op; u.pred = pred; u.fn = fn;
    u.rd = 2'(rd); u.ra = 2'(ra); u.rb = 2'(rb); u.k = 2'(k); u.sx = sx;
    return 64'(u);
  endfunction

  function automatic int entry_of(int t);
    case (t)
      T_PR:    return 0;
      T_BFS:   return 4;
      T_SSSP:  return 12;
      default: return 23;
    endcase
  endfunction

  function automatic logic [63:0] prog(int j);
    case (j)
      // PageRank: next_pagerank += contribution
      0:  return uop(U_LDP, PR_AL, F_MOV, 1, 0, 0, 0);
      1:  return uop(U_ALU, PR_AL, F_FADD, 1, 1, 0);
      2:  return uop(U_STP, PR_AL, F_MOV, 0, 1, 0, 0);
      3:  return uop(U_END);
      // BFS: if parent == none { parent = src; activate; push }
      4:  return uop(U_LDP, PR_AL, F_MOV, 1, 0, 0, 0);
      5:  return uop(U_LDG, PR_AL, F_MOV, 2, 0, 0, 0);
      6:  return uop(U_CMP, PR_AL, F_FADD, 0, 1, 2);        // equal
      7:  return uop(U_END, PR_F);
      8:  return uop(U_STP, PR_AL, F_MOV, 0, 0, 0, 0);
      9:  return uop(U_SETACT, PR_AL, F_MOV, 0, 0, 0, 0);
      10: return uop(U_PUSH);
      11: return uop(U_END);
      // SSSP: if new < len { len = new; if !visited { visited = 1; activate } }
      12: return uop(U_LDP, PR_AL, F_MOV, 1, 0, 0, 0, 1);
      13: return uop(U_CMP, PR_AL, F_SMIN, 0, 0, 1);       // signed less
      14: return uop(U_END, PR_F);
      15: return uop(U_STP, PR_AL, F_MOV, 0, 0, 0, 0);
      16: return uop(U_LDP, PR_AL, F_MOV, 2, 0, 0, 1);
      17: return uop(U_LDG, PR_AL, F_MOV, 3, 0, 0, 1);
      18: return uop(U_CMP, PR_AL, F_FADD, 0, 2, 3);       // visited == 1
      19: return uop(U_END, PR_T);
      20: return uop(U_STP, PR_AL, F_MOV, 0, 3, 0, 1);
      21: return uop(U_SETACT, PR_AL, F_MOV, 0, 0, 0, 0);
      22: return uop(U_END);
      // CC: if new < id { id = new; activate }
      23: return uop(U_LDP, PR_AL, F_MOV, 1, 0, 0, 0);
      24: return uop(U_CMP, PR_AL, F_UMIN, 0, 0, 1);       // unsigned less
      25: return uop(U_END, PR_F);
      26: return uop(U_STP, PR_AL, F_MOV, 0, 0, 0, 0);
      27: return uop(U_SETACT, PR_AL, F_MOV, 0, 0, 0, 0);
      default: return uop(U_END);
    endcase
  endfunction

  // Reference semantics of the programs above on 64-bit values of Prop 0
  // (p0) and Prop 1 (p1), with Prop sizes sz0 / sz1 bytes.
  function automatic logic [63:0] mask_of(int sz);
    return (sz >= 8) ? '1 : ((64'd1 << (8 * sz)) - 1);
  endfunction
endpackage
