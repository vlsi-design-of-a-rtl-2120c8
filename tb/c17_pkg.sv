// c17_pkg: the ISCAS-85 circuit c17 mapped onto a 6x6 cellular array, and a
// reference model of it, for the array and chip testbenches.
//
// Primary inputs enter column 0 on rows 0..5 as N1, N3, N3, N2, N6, N7 (N3
// has two branches).  Column 0 computes N10 = NAND(N1,N3) (rows 0-1), buffers
// N2 (row 2, which receives N2 from row 3 on the upward path while sending
// its own left input N3 down to row 3) and N11 = NAND(N3,N6) (rows 3-4), and
// buffers N7 (row 5).  Column 1 distributes: N11 to rows 3 and 2 (FanoutNo 2),
// N2 to row 1, N7 to row 4.  Column 2 buffers N10 and computes N16 =
// NAND(N2,N11) and N19 = NAND(N11,N7).  Column 3 sends N16 to rows 1 and 2.
// Column 4 computes N22 = NAND(N10,N16) (rows 0-1) and N23 = NAND(N16,N19)
// (rows 2-3).  Column 5 keeps N22 on row 0 and moves N23 up to row 1, so the
// primary outputs leave on rows 0 and 1 of the right edge.
package c17_pkg;
  import ca_pkg::*;

  typedef struct packed {
    state_e     st;
    logic [1:0] fo;     // FanoutNo
    off_t       off;    // OffReg
    gtype_e     g;      // Gtype
  } cell_cfg_t;

  function automatic cell_cfg_t cfg(int r, int c);
    cell_cfg_t x;
    x = '{st: ST_STABLE, fo: 2'd0, off: '0, g: G_BUF};
    unique case (c)
      0: unique case (r)
           0: x = '{ST_FANIN,    2'd0, off_t'(0),  G_NAND};
           1: x = '{ST_BOTFANIN, 2'd0, off_t'(0),  G_BUF};
           2: x = '{ST_BOTFANIN, 2'd0, off_t'(1),  G_BUF};
           3: x = '{ST_FANIN,    2'd0, off_t'(-1), G_NAND};
           4: x = '{ST_BOTFANIN, 2'd0, off_t'(0),  G_BUF};
           5: x = '{ST_BOTFANIN, 2'd0, off_t'(0),  G_BUF};
           default: ;
         endcase
      1: unique case (r)
           0: x = '{ST_FANOUTRECV, 2'd1, off_t'(0),  G_BUF};
           1: x = '{ST_FANOUT,     2'd0, off_t'(0),  G_BUF};
           2: x = '{ST_FANOUTRECV, 2'd1, off_t'(-1), G_BUF};
           3: x = '{ST_FANOUTRECV, 2'd2, off_t'(-1), G_BUF};
           4: x = '{ST_FANOUT,     2'd0, off_t'(0),  G_BUF};
           5: x = '{ST_FANOUTRECV, 2'd1, off_t'(-1), G_BUF};
           default: ;
         endcase
      2: unique case (r)
           0: x = '{ST_BOTFANIN, 2'd0, off_t'(0), G_BUF};
           1: x = '{ST_FANIN,    2'd0, off_t'(0), G_NAND};
           2: x = '{ST_BOTFANIN, 2'd0, off_t'(0), G_BUF};
           3: x = '{ST_FANIN,    2'd0, off_t'(0), G_NAND};
           4: x = '{ST_BOTFANIN, 2'd0, off_t'(0), G_BUF};
           default: ;
         endcase
      3: unique case (r)
           0: x = '{ST_FANOUTRECV, 2'd1, off_t'(0), G_BUF};
           1: x = '{ST_FANOUTRECV, 2'd2, off_t'(1), G_BUF};
           2: x = '{ST_FANOUT,     2'd0, off_t'(0), G_BUF};
           3: x = '{ST_FANOUTRECV, 2'd1, off_t'(0), G_BUF};
           default: ;
         endcase
      4: unique case (r)
           0: x = '{ST_FANIN,    2'd0, off_t'(0), G_NAND};
           1: x = '{ST_BOTFANIN, 2'd0, off_t'(0), G_BUF};
           2: x = '{ST_FANIN,    2'd0, off_t'(0), G_NAND};
           3: x = '{ST_BOTFANIN, 2'd0, off_t'(0), G_BUF};
           default: ;
         endcase
      5: unique case (r)
           0: x = '{ST_FANOUTRECV, 2'd1, off_t'(0),  G_BUF};
           1: x = '{ST_FANOUT,     2'd0, off_t'(0),  G_BUF};
           2: x = '{ST_FANOUTRECV, 2'd1, off_t'(-1), G_BUF};
           default: ;
         endcase
      default: ;
    endcase
    return x;
  endfunction

  // Initialization word of cell (r,c) for a pass; uo_next are the control
  // bits a type-A pass leaves for the following pass.
  function automatic logic [7:0] pass_word(int r, int c, pass_e p, logic [1:0] uo_next,
                                           logic [1:0] fault);
    cell_cfg_t x = cfg(r, c);
    unique case (p)
      PASS_A:  return {uo_next, x.fo, 4'(x.st)};
      PASS_B:  return 8'(x.off);
      PASS_C:  return {5'd0, 3'(x.g)};
      default: return {6'd0, fault};
    endcase
  endfunction

  // Left-edge input word: rows 0..5 carry N1, N3, N3, N2, N6, N7.
  // pi = {N7, N6, N3, N2, N1}.
  function automatic logic [5:0] pi_rows(logic [4:0] pi);
    return {pi[4], pi[3], pi[1], pi[2], pi[2], pi[0]};
  endfunction

  // Reference c17.  fault_net selects a stuck-at fault on a gate input:
  // 0 none, 9 = the N3 branch into N11 (array cell row 3, column 0).
  function automatic logic [1:0] c17_ref(logic [4:0] pi, int fault_net, logic sa);
    logic n1, n2, n3, n6, n7, n3b, n10, n11, n16, n19, n22, n23;
    {n7, n6, n3, n2, n1} = pi;
    n3b = (fault_net == 9) ? sa : n3;
    n10 = ~(n1 & n3);
    n11 = ~(n3b & n6);
    n16 = ~(n2 & n11);
    n19 = ~(n11 & n7);
    n22 = ~(n10 & n16);
    n23 = ~(n16 & n19);
    return {n23, n22};
  endfunction
endpackage
