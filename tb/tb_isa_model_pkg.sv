// tb_isa_model_pkg: arithmetic reference model of the inexact speculative
// adder, used by the end-to-end testbenches.
//
// It works on integers rather than on carry equations: every block sum is
// (a_j + b_j + carry_j) split into sum and carry, a speculated carry is the
// carry out of (window_a + window_b + assumed carry-in), and compensation is
// done as integer increment/decrement of the low field or forcing of the high
// field, as the design specifies for each speculation error.
package tb_isa_model_pkg;

  typedef struct {
    longint unsigned sum;
    bit              cout;
    bit [31:0]       fe, cor, bal;   // per boundary
    bit [31:0]       pos;            // error direction: 1 positive
  } isa_res_t;

  function automatic isa_res_t isa_model(longint unsigned a, longint unsigned b, bit cin,
                                         int n, int x, int r, int lbits, int bbits, bit spec_cin);
    isa_res_t res;
    int nb = n / x;
    longint unsigned mx = (64'd1 << x) - 1;
    longint unsigned blk_s[32];
    bit blk_c[32], blk_cin[32];
    res.fe = 0; res.cor = 0; res.bal = 0; res.pos = 0;
    for (int j = 0; j < nb; j++) begin
      longint unsigned t;
      if (j == 0) blk_cin[j] = cin;
      else begin
        longint unsigned wa = (a >> ((j-1)*x + x - r)) & ((64'd1 << r) - 1);
        longint unsigned wb = (b >> ((j-1)*x + x - r)) & ((64'd1 << r) - 1);
        blk_cin[j] = ((wa + wb + spec_cin) >> r) != 0;
      end
      t = ((a >> (j*x)) & mx) + ((b >> (j*x)) & mx) + blk_cin[j];
      blk_s[j] = t & mx;
      blk_c[j] = (t >> x) != 0;
    end
    for (int j = 0; j < nb - 1; j++) begin
      longint unsigned lmask = (64'd1 << lbits) - 1;
      longint unsigned bmask = ((64'd1 << bbits) - 1) << (x - bbits);
      longint unsigned lo = blk_s[j+1] & lmask;
      if (blk_cin[j+1] != blk_c[j]) begin
        res.fe[j] = 1;
        res.pos[j] = blk_c[j];
        if (blk_c[j]) begin            // sum one unit low
          if (lo != lmask) begin
            blk_s[j+1] = (blk_s[j+1] & ~lmask) | (lo + 1);
            res.cor[j] = 1;
          end else begin
            blk_s[j] = blk_s[j] | bmask;
            res.bal[j] = 1;
          end
        end else begin                 // sum one unit high
          if (lo != 0) begin
            blk_s[j+1] = (blk_s[j+1] & ~lmask) | (lo - 1);
            res.cor[j] = 1;
          end else begin
            blk_s[j] = blk_s[j] & ~bmask;
            res.bal[j] = 1;
          end
        end
      end
    end
    res.sum = 0;
    for (int j = 0; j < nb; j++) res.sum |= blk_s[j] << (j*x);
    res.cout = blk_c[nb-1];
    return res;
  endfunction

endpackage
