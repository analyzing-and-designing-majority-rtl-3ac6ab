// tb_afa_ref_pkg: reference models for the approximate-adder testbenches.
//
// afa_ref() evaluates an approximate ripple adder from a cell string such as "1212"
// (character i is the cell at bit i: '1' = AFA1, '2' = AFA2) directly from the cell
// truth tables, independently of the RTL structure. It returns {cout, s}.
package tb_afa_ref_pkg;

  function automatic int unsigned maj(int unsigned x, int unsigned y, int unsigned z);
    return (x + y + z) >= 2 ? 1 : 0;
  endfunction

  function automatic int unsigned afa_ref(string cells, int unsigned a, int unsigned b,
                                          int unsigned cin);
    int unsigned c = cin;
    int unsigned s = 0;
    for (int i = 0; i < cells.len(); i++) begin
      int unsigned ai = (a >> i) & 1;
      int unsigned bi = (b >> i) & 1;
      int unsigned si;
      if (cells[i] == "1") begin
        // AFA1 truth table: carry is the majority, sum its complement.
        si = 1 - maj(ai, bi, c);
        c  = maj(ai, bi, c);
      end else begin
        // AFA2 truth table: carry passed through, sum is majority with ~cin.
        si = maj(ai, bi, 1 - c);
      end
      s |= si << i;
    end
    return s | (c << cells.len());
  endfunction

  function automatic int unsigned abs_diff(int unsigned x, int unsigned y);
    return x > y ? x - y : y - x;
  endfunction

endpackage
