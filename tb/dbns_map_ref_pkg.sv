// dbns_map_ref_pkg -- reference functions for the DBNS map testbenches.
//
// A map of rows x cols cells is passed flattened, cell (j, i) at bit
// j*cols + i, as packed [rows-1:0][cols-1:0] arrays are laid out. map_val()
// is the sum of 2^i * 3^j over the active cells; reduced() says whether no
// reduction rule applies anywhere its result cell would fit.
package dbns_map_ref_pkg;

  function automatic longint map_val(logic [63:0] flat, int rows, int cols);
    longint v = 0, p3 = 1;
    for (int j = 0; j < rows; j++) begin
      for (int i = 0; i < cols; i++)
        if (flat[j*cols+i]) v += (longint'(1) << i) * p3;
      p3 *= 3;
    end
    return v;
  endfunction

  function automatic bit reduced(logic [63:0] flat, int rows, int cols);
    for (int j = 0; j < rows; j++)
      for (int i = 0; i < cols; i++) begin
        // rule I: (j,i)+(j,i+1) -> (j+1,i); rule III needs the same pair and row j+1
        if (i + 1 < cols && j + 1 < rows && flat[j*cols+i] && flat[j*cols+i+1]) return 0;
        // rule II: (j,i)+(j+1,i) -> (j,i+2)
        if (i + 2 < cols && j + 1 < rows && flat[j*cols+i] && flat[(j+1)*cols+i]) return 0;
      end
    return 1;
  endfunction

endpackage
