// sched_pkg: a small offline list scheduler for the testbenches.
//
// It turns a graph of binary floating-point operations into the contents of
// the engine's program memories, following the engine's timing contract
// (see vec_engine): every operation is placed on an ADD or MULTI PE in a PE
// cycle where both operands are already in that PE's memory, and every
// operand that is not yet there is moved by the crossbar either directly (the
// cycle after it leaves its PE) or indirectly (through the producer's buffer).
//
// Operations are taken in classical list-scheduling order: ascending ALAP,
// then ascending ASAP, both counted in PE cycles with an operation weighing
// its PE depth plus two cycles of transfer. For each operation the earliest
// cycle with a free PE is chosen; among the free PEs of that cycle the one
// needing the cheapest transfers wins (operand already present 0, direct 1,
// indirect 3 per operand, the order of the preference table). Value v lives
// at PE Memory address v in every memory that holds it; initial values are
// preloaded everywhere. Results that nothing consumes are finally written
// into their own PE Memory so that they can be read out.
//
// Every booking is journalled so that a trial placement can be undone.
package sched_pkg;
  import vec_pkg::*;
  import fp_ref_pkg::*;

  localparam int MAXPE = 8;
  localparam int MAXC  = 1024;
  localparam int MAXV  = 2048;
  localparam int NBUF  = 16;

  typedef enum int {OP_ADD = 0, OP_SUB = 1, OP_MUL = 2} op_e;

  // journal record kinds
  typedef enum int {J_WSLOT, J_BWR, J_BRD, J_BBUSY, J_AVAIL, J_BUF,
                    J_INSTR, J_BINSTR, J_XSEL, J_LEN} jk_e;
  typedef struct {
    jk_e kind;
    int  i0, i1, i2;
    int  old0, old1;
    pe_instr_t  oi;
    buf_instr_t ob;
  } jrec_t;

  class Sched;
    int n_add, n_mul, n_pe, add_s, mul_s, prog_depth;
    int  n_init, n_val;
    op_e kind [MAXV];
    int  src_a [MAXV], src_b [MAXV];
    logic [31:0] value [MAXV];           // reference result of every value
    int  n_cons [MAXV];
    int  asap [MAXV], alap [MAXV], crit;
    int  pe_of [MAXV], t_of [MAXV];
    int  avail [MAXPE][MAXV];            // cycle written in PE Memory p, -1 absent
    int  buf_e [MAXV], buf_end [MAXV];   // buffer entry holding the value
    bit  issue_used [MAXPE][MAXC];
    bit  wslot [MAXPE][MAXC][2];
    bit  bwr_used [MAXPE][MAXC];
    bit  brd_used [MAXPE][MAXC];
    bit  bbusy [MAXPE][NBUF][MAXC];
    pe_instr_t  instr  [MAXPE][MAXC];
    buf_instr_t binstr [MAXPE][MAXC];
    int         xsel   [MAXC][2*MAXPE];
    int  length;
    bit  failed;
    int  n_direct, n_indirect;
    jrec_t jr[$];
    bit  journal_on;

    function new(int n_add_i, int n_mul_i, int add_s_i, int mul_s_i, int prog_depth_i);
      n_add = n_add_i; n_mul = n_mul_i; n_pe = n_add + n_mul;
      add_s = add_s_i; mul_s = mul_s_i; prog_depth = prog_depth_i;
      n_init = 0; n_val = 0; length = 0; failed = 0; crit = 0;
      n_direct = 0; n_indirect = 0; journal_on = 0;
      for (int p = 0; p < MAXPE; p++)
        for (int c = 0; c < MAXC; c++) begin
          instr[p][c] = '0; binstr[p][c] = '0;
          issue_used[p][c] = 0; wslot[p][c][0] = 0; wslot[p][c][1] = 0;
          bwr_used[p][c] = 0; brd_used[p][c] = 0;
          for (int e = 0; e < NBUF; e++) bbusy[p][e][c] = 0;
        end
      for (int c = 0; c < MAXC; c++)
        for (int o = 0; o < 2*MAXPE; o++) xsel[c][o] = 0;
    endfunction

    // ---------------------------------------------------------- graph input
    function int add_init(logic [31:0] v);
      value[n_val] = v; n_cons[n_val] = 0; pe_of[n_val] = -1; t_of[n_val] = -1;
      buf_e[n_val] = -1; buf_end[n_val] = -1;
      n_init++;
      return n_val++;
    endfunction

    function int add_op(op_e k, int a, int b);
      kind[n_val] = k; src_a[n_val] = a; src_b[n_val] = b;
      n_cons[a]++; n_cons[b]++;
      case (k)
        OP_ADD:  value[n_val] = ref_add(value[a], value[b], 1'b0);
        OP_SUB:  value[n_val] = ref_add(value[a], value[b], 1'b1);
        default: value[n_val] = ref_mul(value[a], value[b]);
      endcase
      n_cons[n_val] = 0; pe_of[n_val] = -1; t_of[n_val] = -1;
      buf_e[n_val] = -1; buf_end[n_val] = -1;
      return n_val++;
    endfunction

    function int stages(int v);
      return (kind[v] == OP_MUL) ? mul_s : add_s;
    endfunction
    function int weight(int v);
      return stages(v) + XFER_CYCLES;
    endfunction

    // ------------------------------------------------------ journalled sets
    function void j(jk_e k, int a, int b, int c, int o0, int o1);
      jrec_t r;
      if (!journal_on) return;
      r.kind = k; r.i0 = a; r.i1 = b; r.i2 = c; r.old0 = o0; r.old1 = o1;
      if (k == J_INSTR)  r.oi = instr[a][b];
      if (k == J_BINSTR) r.ob = binstr[a][b];
      jr.push_back(r);
    endfunction

    function void rollback();
      while (jr.size() > 0) begin
        jrec_t r;
        r = jr.pop_back();
        case (r.kind)
          J_WSLOT:  wslot[r.i0][r.i1][r.i2] = r.old0[0];
          J_BWR:    bwr_used[r.i0][r.i1] = r.old0[0];
          J_BRD:    brd_used[r.i0][r.i1] = r.old0[0];
          J_BBUSY:  bbusy[r.i0][r.i1][r.i2] = r.old0[0];
          J_AVAIL:  avail[r.i0][r.i1] = r.old0;
          J_BUF:    begin buf_e[r.i0] = r.old0; buf_end[r.i0] = r.old1; end
          J_INSTR:  instr[r.i0][r.i1] = r.oi;
          J_BINSTR: binstr[r.i0][r.i1] = r.ob;
          J_XSEL:   xsel[r.i0][r.i1] = r.old0;
          J_LEN:    length = r.old0;
          default: ;
        endcase
      end
    endfunction

    function void book_write(int p, int w, int k, int v, int src);
      j(J_WSLOT, p, w, k, int'(wslot[p][w][k]), 0); wslot[p][w][k] = 1;
      j(J_XSEL, w - 1, 2*p + k, 0, xsel[w-1][2*p+k], 0); xsel[w-1][2*p+k] = src;
      j(J_INSTR, p, w, 0, 0, 0);
      if (k == 0) begin instr[p][w].we_a = 1'b1; instr[p][w].wr_a = 12'(v); end
      else        begin instr[p][w].we_b = 1'b1; instr[p][w].wr_b = 12'(v); end
      j(J_AVAIL, p, v, 0, avail[p][v], 0); avail[p][v] = w;
      if (w + 1 > length) begin j(J_LEN, 0, 0, 0, length, 0); length = w + 1; end
    endfunction

    function bit range_free(int pp, int e, int from, int to);
      for (int i = from; i <= to; i++) if (bbusy[pp][e][i]) return 0;
      return 1;
    endfunction

    function void hold(int pp, int e, int from, int to);
      for (int i = from; i <= to; i++) begin
        j(J_BBUSY, pp, e, i, int'(bbusy[pp][e][i]), 0);
        bbusy[pp][e][i] = 1;
      end
    endfunction

    // Make value v present in PE Memory p by cycle t-1, booking what it
    // takes. Returns 0 (present), 1 (direct), 3 (indirect) or -1.
    function int bring(int v, int p, int t);
      int r, w, pp;
      if (avail[p][v] != -1 && avail[p][v] <= t - 1) return 0;
      if (avail[p][v] != -1) return -1;
      pp = pe_of[v];
      r  = t_of[v] + stages(v);
      w  = r + 1;
      if (w <= t - 1 && w < prog_depth)
        for (int k = 0; k < 2; k++)
          if (!wslot[p][w][k]) begin
            book_write(p, w, k, v, pp);
            return 1;
          end
      for (int c = r + 1; c + 2 <= t - 1 && c + 2 < prog_depth; c++) begin
        int k;
        if (brd_used[pp][c]) continue;
        k = !wslot[p][c+2][0] ? 0 : (!wslot[p][c+2][1] ? 1 : -1);
        if (k < 0) continue;
        if (buf_e[v] >= 0) begin
          if (c > buf_end[v]) begin
            if (!range_free(pp, buf_e[v], buf_end[v] + 1, c)) continue;
            hold(pp, buf_e[v], buf_end[v] + 1, c);
            j(J_BUF, v, 0, 0, buf_e[v], buf_end[v]); buf_end[v] = c;
          end
        end else begin
          int e;
          if (bwr_used[pp][r]) continue;
          e = -1;
          for (int q = 0; q < NBUF && e < 0; q++) if (range_free(pp, q, r + 1, c)) e = q;
          if (e < 0) continue;
          j(J_BWR, pp, r, 0, int'(bwr_used[pp][r]), 0); bwr_used[pp][r] = 1;
          j(J_BINSTR, pp, r, 0, 0, 0);
          binstr[pp][r].we = 1'b1;
          binstr[pp][r].wr = 4'(e);
          hold(pp, e, r + 1, c);
          j(J_BUF, v, 0, 0, buf_e[v], buf_end[v]); buf_e[v] = e; buf_end[v] = c;
        end
        j(J_BRD, pp, c, 0, int'(brd_used[pp][c]), 0); brd_used[pp][c] = 1;
        j(J_BINSTR, pp, c, 0, 0, 0);
        binstr[pp][c].rd = 4'(buf_e[v]);
        book_write(p, c + 2, k, v, n_pe + pp);
        return 3;
      end
      return -1;
    endfunction

    function int place(int v, int p, int t);
      int ca, cb;
      ca = bring(src_a[v], p, t);
      if (ca < 0) return -1;
      cb = bring(src_b[v], p, t);
      if (cb < 0) return -1;
      return ca + cb;
    endfunction

    // ------------------------------------------------------------- priority
    function void attributes();
      crit = 0;
      for (int v = 0; v < n_val; v++) begin
        asap[v] = 0;
        if (v < n_init) continue;
        if (src_a[v] >= n_init) asap[v] = asap[src_a[v]] + weight(src_a[v]);
        if (src_b[v] >= n_init && asap[src_b[v]] + weight(src_b[v]) > asap[v])
          asap[v] = asap[src_b[v]] + weight(src_b[v]);
        if (asap[v] + weight(v) > crit) crit = asap[v] + weight(v);
      end
      for (int v = n_init; v < n_val; v++) alap[v] = crit - weight(v);
      for (int v = n_val - 1; v >= n_init; v--) begin
        if (src_a[v] >= n_init && alap[v] - weight(src_a[v]) < alap[src_a[v]])
          alap[src_a[v]] = alap[v] - weight(src_a[v]);
        if (src_b[v] >= n_init && alap[v] - weight(src_b[v]) < alap[src_b[v]])
          alap[src_b[v]] = alap[v] - weight(src_b[v]);
      end
    endfunction

    // ------------------------------------------------------------ schedule
    function void run();
      int ord[$];
      for (int p = 0; p < MAXPE; p++)
        for (int v = 0; v < MAXV; v++) avail[p][v] = (v < n_init) ? -1000 : -1;
      attributes();
      for (int v = n_init; v < n_val; v++) ord.push_back(v);
      ord.sort() with (alap[item] * 65536 + asap[item]);
      foreach (ord[i]) begin
        int v, earliest, best_p, best_t, best_cost;
        v = ord[i];
        earliest = 0;
        if (src_a[v] >= n_init) earliest = t_of[src_a[v]] + weight(src_a[v]);
        if (src_b[v] >= n_init && t_of[src_b[v]] + weight(src_b[v]) > earliest)
          earliest = t_of[src_b[v]] + weight(src_b[v]);
        best_p = -1; best_t = -1; best_cost = 99;
        for (int t = earliest; t < prog_depth && best_p < 0; t++)
          for (int p = 0; p < n_pe; p++) begin
            int cost;
            if ((p < n_add) != (kind[v] != OP_MUL) || issue_used[p][t]) continue;
            journal_on = 1;
            cost = place(v, p, t);
            rollback();
            journal_on = 0;
            if (cost >= 0 && cost < best_cost) begin
              best_cost = cost; best_p = p; best_t = t;
            end
          end
        if (best_p < 0 || place(v, best_p, best_t) < 0) begin failed = 1; return; end
        pe_of[v] = best_p; t_of[v] = best_t;
        issue_used[best_p][best_t] = 1;
        instr[best_p][best_t].rd_a = 12'(src_a[v]);
        instr[best_p][best_t].rd_b = 12'(src_b[v]);
        instr[best_p][best_t].op_sub = (kind[v] == OP_SUB);
        if (best_t + weight(v) > length) length = best_t + weight(v);
      end
      // results nobody consumes go back into their own PE Memory
      for (int v = n_init; v < n_val; v++)
        if (n_cons[v] == 0 && avail[pe_of[v]][v] == -1)
          if (bring(v, pe_of[v], prog_depth + 1) < 0) begin failed = 1; return; end
      for (int p = 0; p < n_pe; p++)
        for (int c = 1; c < prog_depth; c++)
          for (int k = 0; k < 2; k++)
            if (wslot[p][c][k]) begin
              if (xsel[c-1][2*p+k] < n_pe) n_direct++; else n_indirect++;
            end
    endfunction
  endclass
endpackage
