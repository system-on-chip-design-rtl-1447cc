// cd_ref_pkg: reference model of the cortical-diencephalic (CD) centre for
// the testbenches, written from its truth table rather than from the RTL.
//
// One pass of the CD program looks at a snapshot (DA, MI, RI) and the stored
// state. Rows, checked in order, each also requiring the stored state to be
// non-zero:
//   1  DA < H1,        MI = 0,  RI != 0 is false  -> PA = v[2], PS = v[3]
//   2  H1 <= DA < H2,  MI = 0,  RI != 0           -> PA = v[4], PS = v[5]
//   3  (H1 <= DA < H2, MI != 0, RI = 0) or DA >= H2 -> PA = v[6], PS = v[7]
// If no row holds the program falls through to the row-1 outputs and stores
// the unqualified row-3 condition as the new state. A pass lasts 24 clocks
// for row 1, 51 for row 2 and 88 otherwise (without stalls).
package cd_ref_pkg;

  localparam int H1 = 2000;    // 2.00 x 1000
  localparam int H2 = 18200;   // 18.2 x 1000

  typedef struct {
    int pa, ps, len, state, row;
  } cd_expect_t;

  function automatic cd_expect_t cd_model(int da, int mi, int ri, int prev,
                                          int h1, int h2, int one);
    cd_expect_t e;
    bit band, c1, c2, c3;
    band = (da >= h1) && (da < h2);
    c1 = (da < h1) && mi == 0 && ri == 0;
    c2 = band && mi == 0 && ri != 0;
    c3 = (band && mi != 0 && ri == 0) || (da >= h2);
    if (c1 && prev != 0)      begin e.pa = 0;   e.ps = 0;   e.len = 24; e.state = 1;        e.row = 1; end
    else if (c2 && prev != 0) begin e.pa = 0;   e.ps = one; e.len = 51; e.state = 1;        e.row = 2; end
    else if (c3 && prev != 0) begin e.pa = one; e.ps = 0;   e.len = 88; e.state = 1;        e.row = 3; end
    else                      begin e.pa = 0;   e.ps = 0;   e.len = 88; e.state = int'(c3); e.row = 0; end
    return e;
  endfunction

endpackage
