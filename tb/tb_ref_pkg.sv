// Reference model for the testbenches: the full local-alignment score
// matrix with start-cell bookkeeping, computed directly from the recurrence
//   H(i,j) = max(0, H(i-1,j-1)+s, H(i-1,j)+gap, H(i,j-1)+gap)
// with ties resolved diagonal, up, left, and the path start taken from the
// chosen predecessor (or the cell itself when the diagonal predecessor is 0
// or the score is 0). From the matrix it derives what the hardware reports:
// the overall best (first column, then first row, with strictly greater
// scores), every row's best (first column) and the row-major best.
package tb_ref_pkg;

  typedef struct {
    int score;
    int row, col, srow, scol;
  } cell_t;

  function automatic int sc(byte a, byte b, int m, int mm);
    return (a == b) ? m : mm;
  endfunction

  // Per column j: the last row's cell (score and path start) and the best
  // cell of the column (first row wins), as the last PE reports them.
  function automatic void columns(input byte q[$], input byte r[$],
                                  input int m, input int mm, input int gap,
                                  ref cell_t last[$], ref cell_t colbest[$]);
    int M = q.size(), N = r.size();
    int H[][], SR[][], SCL[][];
    fill(q, r, m, mm, gap, H, SR, SCL);
    last.delete(); colbest.delete();
    for (int j = 1; j <= N; j++) begin
      cell_t b = '{0, 0, 0, 0, 0};
      for (int i = 1; i <= M; i++)
        if (H[i][j] > b.score) b = '{H[i][j], i, j, SR[i][j], SCL[i][j]};
      last.push_back('{H[M][j], M, j, SR[M][j], SCL[M][j]});
      colbest.push_back(b);
    end
  endfunction

  function automatic void fill(input byte q[$], input byte r[$],
                               input int m, input int mm, input int gap,
                               ref int H[][], ref int SR[][], ref int SCL[][]);
    int M = q.size(), N = r.size();
    H = new[M+1]; SR = new[M+1]; SCL = new[M+1];
    for (int i = 0; i <= M; i++) begin
      H[i] = new[N+1]; SR[i] = new[N+1]; SCL[i] = new[N+1];
      for (int j = 0; j <= N; j++) begin H[i][j] = 0; SR[i][j] = 0; SCL[i][j] = 0; end
    end
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++) begin
        int d = H[i-1][j-1] + sc(q[i-1], r[j-1], m, mm);
        int u = H[i-1][j] + gap;
        int l = H[i][j-1] + gap;
        H[i][j] = 0; SR[i][j] = i; SCL[i][j] = j;
        if (d > 0 && d >= u && d >= l) begin
          H[i][j] = d;
          if (H[i-1][j-1] != 0) begin SR[i][j] = SR[i-1][j-1]; SCL[i][j] = SCL[i-1][j-1]; end
        end else if (u > 0 && u >= l) begin
          H[i][j] = u; SR[i][j] = SR[i-1][j]; SCL[i][j] = SCL[i-1][j];
        end else if (l > 0) begin
          H[i][j] = l; SR[i][j] = SR[i][j-1]; SCL[i][j] = SCL[i][j-1];
        end
      end
  endfunction

  // q: query (rows), r: reference (columns)
  function automatic void align(input byte q[$], input byte r[$],
                                input int m, input int mm, input int gap,
                                output cell_t overall, output cell_t rowmajor,
                                ref cell_t rowbest[$]);
    int M = q.size(), N = r.size();
    int H[][], SR[][], SCL[][];
    fill(q, r, m, mm, gap, H, SR, SCL);
    overall = '{0, 0, 0, 0, 0};
    for (int j = 1; j <= N; j++)
      for (int i = 1; i <= M; i++)
        if (H[i][j] > overall.score) overall = '{H[i][j], i, j, SR[i][j], SCL[i][j]};
    rowbest.delete();
    rowmajor = '{0, 0, 0, 0, 0};
    for (int i = 1; i <= M; i++) begin
      cell_t b = '{0, i, 0, 0, 0};
      for (int j = 1; j <= N; j++)
        if (H[i][j] > b.score) b = '{H[i][j], i, j, SR[i][j], SCL[i][j]};
      rowbest.push_back(b);
      if (b.score > rowmajor.score) rowmajor = b;
    end
  endfunction

  function automatic byte rand_base();
    byte t[4] = '{8'h41, 8'h43, 8'h47, 8'h54};   // A C G T
    return t[$urandom_range(3)];
  endfunction

endpackage
