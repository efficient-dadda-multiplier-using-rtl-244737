// dadda_plan_pkg: elaboration-time planner of the approximate Dadda tree.
//
// approx_dadda_mult does not spell out its compressor tree by hand. It asks
// plan_query() at elaboration time for one cell at a time, and the answers
// are constants. The planner works on the partial-product "bit heap" of an
// N x N multiplication: column c holds every a[i]&b[j] with i+j = c, plus the
// set bits of an optional constant correction term.
//
// Reduction levels: the heap is halved level by level with 4:2 compressors.
// The target heights are ..., 8, 4, 2, so an 8x8 multiplier has two levels
// (8 -> 4 -> 2) and a 16x16 multiplier has three. Each level walks the
// columns from LSB to MSB. A column keeps taking cells until the bits it will
// hand to the next level fit the target. Those bits are the sums, the
// carries arriving from the column below, and what stays unused. The cell
// taken is the smallest one that still fits, as Dadda's method does: a 4:2
// compressor when 3 or more bits are too many, a full adder for 2, a half
// adder for 1.
//
// Approximate region: compressors in columns below NA are approximate (no
// cin/cout). Compressors in column NA and above are exact. The couts of an
// exact column feed, as carry-ins, the exact compressors of the next column
// in the same level. Leftover couts pass down to the next level as plain
// bits.
//
// Error correction (ECM = 1): each approximate compressor in column NA-1,
// the most significant column of the approximate region, gets an AND gate on
// its Q3/Q4 inputs. The AND outputs join the carry-ins of column NA in the
// same level. There they drive the otherwise unused carry-in of the lowest
// exact compressors.
//
// Node numbering: 0..N*N-1 are the partial products (node i*N+j = a[i]&b[j]).
// N*N is constant 1 and N*N+1 is constant 0. Cell outputs follow from N*N+2.
package dadda_plan_pkg;

  localparam int MAXC = 64;   // columns: supports N up to 32
  localparam int MAXH = 64;   // bits per column and per pool

  // Cell kinds.
  localparam int CELL_HA     = 0;
  localparam int CELL_FA     = 1;
  localparam int CELL_EXACT  = 2;  // exact 4:2 compressor
  localparam int CELL_APPROX = 3;  // approximate 4:2 compressor
  localparam int CELL_ECM    = 4;  // error-correction AND gate

  // Queries.
  localparam int Q_NCELL = 0;  // number of cells
  localparam int Q_NNODE = 1;  // number of nodes
  localparam int Q_CELL  = 2;  // field f of cell k
  localparam int Q_ROW   = 3;  // node of row f (0/1) in column k after reduction
  localparam int Q_NECM  = 4;  // number of error-correction gates
  localparam int Q_ECM   = 5;  // output node of error-correction gate k
  localparam int Q_NLEV  = 6;  // number of reduction levels

  // Cell fields.
  localparam int F_TYPE  = 0;
  localparam int F_COL   = 1;
  localparam int F_LEVEL = 2;
  localparam int F_IN0   = 3;  // inputs F_IN0..F_IN0+4 (cin is input 4)
  localparam int F_OUT0  = 8;  // sum, carry, cout
  localparam int NFIELD  = 11;

  function automatic int plan_query(int n, int na, bit ecm, logic [63:0] corr,
                                    int what, int k, int f);
    int heap [MAXC*MAXH];  // column c, entry i at c*MAXH+i
    int hc   [MAXC];
    int nxt  [MAXC*MAXH];
    int nc   [MAXC];
    int pool [MAXH];
    int pc, pr;                 // pool count, pool read pointer
    int cins [MAXH];
    int cc, cr;                 // carry-in candidates: count, read pointer
    int couts[MAXH];
    int coc;                    // couts of the current column
    int eterm[MAXH];
    int ec;                     // correction terms waiting for column na
    int fld  [NFIELD];
    int ncell, nnode, necm, cols, maxh, nlev, t, lvl, tgt, tot, ex, avail;
    int one_n, zero_n, q3n, q4n;

    cols   = 2 * n;
    one_n  = n * n;
    zero_n = n * n + 1;
    nnode  = n * n + 2;
    ncell  = 0;
    necm   = 0;

    for (int c = 0; c < MAXC; c++) hc[c] = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        heap[(i+j)*MAXH + hc[i+j]] = i * n + j;
        hc[i+j]++;
      end
    for (int c = 0; c < cols; c++)
      if (corr[c]) begin
        heap[(c)*MAXH + hc[c]] = one_n;
        hc[c]++;
      end

    maxh = 0;
    for (int c = 0; c < cols; c++) if (hc[c] > maxh) maxh = hc[c];
    nlev = 0;
    t    = 2;
    while (t < maxh) begin
      nlev++;
      t = t * 2;
    end
    if (what == Q_NLEV) return nlev;

    for (lvl = 0; lvl < nlev; lvl++) begin
      tgt = 2 << (nlev - 1 - lvl);       // 2^(levels left)
      for (int c = 0; c < MAXC; c++) nc[c] = 0;
      coc = 0;
      ec  = 0;
      for (int c = 0; c < cols; c++) begin
        pc = hc[c];
        pr = 0;
        for (int i = 0; i < pc; i++) pool[i] = heap[(c)*MAXH + i];
        cc = coc;
        cr = 0;
        for (int i = 0; i < coc; i++) cins[i] = couts[i];
        coc = 0;
        if (ecm && c == na) begin
          for (int i = 0; i < ec; i++) begin
            cins[cc] = eterm[i];
            cc++;
          end
          ec = 0;
        end
        tot = nc[c] + (pc - pr) + (cc - cr);
        while (tot > tgt) begin
          ex    = tot - tgt;
          avail = (pc - pr) + (cc - cr);
          for (int i = 0; i < NFIELD; i++) fld[i] = zero_n;
          fld[F_COL]   = c;
          fld[F_LEVEL] = lvl;
          if (ex >= 3 && avail >= 4) begin
            for (int i = 0; i < 4; i++)
              if (pr < pc) begin fld[F_IN0+i] = pool[pr]; pr++; end
              else         begin fld[F_IN0+i] = cins[cr]; cr++; end
            fld[F_OUT0]   = nnode;
            fld[F_OUT0+1] = nnode + 1;
            nnode += 2;
            nxt[(c)*MAXH + nc[c]] = fld[F_OUT0];
            nc[c]++;
            if (c + 1 < cols) begin
              nxt[(c+1)*MAXH + nc[c+1]] = fld[F_OUT0+1];
              nc[c+1]++;
            end
            if (c < na) begin
              fld[F_TYPE] = CELL_APPROX;
              if (what == Q_CELL && ncell == k) return fld[f];
              ncell++;
              if (ecm && c == na - 1) begin
                // error-correction AND on Q3/Q4 of the compressor just placed
                q3n = fld[F_IN0+2];
                q4n = fld[F_IN0+3];
                for (int i = 0; i < NFIELD; i++) fld[i] = zero_n;
                fld[F_TYPE]   = CELL_ECM;
                fld[F_COL]    = c;
                fld[F_LEVEL]  = lvl;
                fld[F_IN0]    = q3n;
                fld[F_IN0+1]  = q4n;
                fld[F_OUT0]   = nnode;
                nnode++;
                eterm[ec] = fld[F_OUT0];
                ec++;
                if (what == Q_ECM && necm == k) return fld[F_OUT0];
                necm++;
                if (what == Q_CELL && ncell == k) return fld[f];
                ncell++;
              end
            end else begin
              fld[F_TYPE] = CELL_EXACT;
              if (cr < cc) begin fld[F_IN0+4] = cins[cr]; cr++; end
              fld[F_OUT0+2] = nnode;
              nnode++;
              if (c + 1 < cols) begin
                couts[coc] = fld[F_OUT0+2];
                coc++;
              end
              if (what == Q_CELL && ncell == k) return fld[f];
              ncell++;
            end
          end else if (ex >= 2 && avail >= 3) begin
            fld[F_TYPE] = CELL_FA;
            for (int i = 0; i < 3; i++)
              if (pr < pc) begin fld[F_IN0+i] = pool[pr]; pr++; end
              else         begin fld[F_IN0+i] = cins[cr]; cr++; end
            fld[F_OUT0]   = nnode;
            fld[F_OUT0+1] = nnode + 1;
            nnode += 2;
            nxt[(c)*MAXH + nc[c]] = fld[F_OUT0];
            nc[c]++;
            if (c + 1 < cols) begin
              nxt[(c+1)*MAXH + nc[c+1]] = fld[F_OUT0+1];
              nc[c+1]++;
            end
            if (what == Q_CELL && ncell == k) return fld[f];
            ncell++;
          end else begin
            fld[F_TYPE] = CELL_HA;
            for (int i = 0; i < 2; i++)
              if (pr < pc) begin fld[F_IN0+i] = pool[pr]; pr++; end
              else         begin fld[F_IN0+i] = cins[cr]; cr++; end
            fld[F_OUT0]   = nnode;
            fld[F_OUT0+1] = nnode + 1;
            nnode += 2;
            nxt[(c)*MAXH + nc[c]] = fld[F_OUT0];
            nc[c]++;
            if (c + 1 < cols) begin
              nxt[(c+1)*MAXH + nc[c+1]] = fld[F_OUT0+1];
              nc[c+1]++;
            end
            if (what == Q_CELL && ncell == k) return fld[f];
            ncell++;
          end
          tot = nc[c] + (pc - pr) + (cc - cr);
        end
        // whatever is left passes to the next level unchanged
        for (int i = pr; i < pc; i++) begin nxt[(c)*MAXH + nc[c]] = pool[i]; nc[c]++; end
        for (int i = cr; i < cc; i++) begin nxt[(c)*MAXH + nc[c]] = cins[i]; nc[c]++; end
      end
      for (int c = 0; c < MAXC; c++) begin
        hc[c] = nc[c];
        for (int i = 0; i < nc[c]; i++) heap[(c)*MAXH + i] = nxt[(c)*MAXH + i];
      end
    end

    case (what)
      Q_NCELL: return ncell;
      Q_NNODE: return nnode;
      Q_NECM:  return necm;
      Q_ROW:   return (f < hc[k]) ? heap[(k)*MAXH + f] : zero_n;
      default: return zero_n;
    endcase
  endfunction

endpackage
