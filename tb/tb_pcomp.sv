// tb_pcomp: self-checking testbench of the pipelined compensator.
//
// Drives every combination of speculated carry, real carry, low sum bits and
// high sum bits, then random ones, into the default instance (1 corrected LSB,
// 2 balanced MSBs) and into a second instance with 2 corrected LSBs. The
// expected outputs come from an integer model: with no error both fields pass;
// a positive error adds one to the low field unless it is at its maximum, when
// the high field becomes all ones; a negative error subtracts one unless the
// low field is zero, when the high field becomes all zeros. Outputs are
// compared two clocks later. Each of the four actions is counted and must
// occur.
module tb_pcomp;
  localparam int unsigned NT = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] en;
  logic spec, cout;
  logic [1:0] s_lsb, s_msb;
  logic [0:0] lo1;
  logic [1:0] lo2, mo1, mo2;
  logic fe1, fe2, co1, co2, ba1, ba2;
  int checks = 0, failures = 0;
  int n_corr_up = 0, n_corr_dn = 0, n_bal_up = 0, n_bal_dn = 0, n_pass = 0;

  logic       hs[NT], hc[NT];
  logic [1:0] hl[NT], hm[NT];
  logic [5:0] stim;

  pcomp dut1 (.clk, .rst_n, .en, .spec, .cout, .s_lsb(s_lsb[0:0]), .s_msb,
              .s_lsb_o(lo1), .s_msb_o(mo1), .fe(fe1), .corrected(co1), .balanced(ba1));
  pcomp #(.LSB_BITS(2), .BAL_BITS(2)) dut2 (.clk, .rst_n, .en, .spec, .cout, .s_lsb, .s_msb,
              .s_lsb_o(lo2), .s_msb_o(mo2), .fe(fe2), .corrected(co2), .balanced(ba2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Integer model: returns {lsb, msb, fe, corrected, balanced}.
  task automatic model(input logic sp, input logic co, input int lsb, input int msb,
                       input int lbits, output int lo, output int mo,
                       output bit f, output bit c, output bit bl);
    int maxv = (1 << lbits) - 1;
    lo = lsb; mo = msb; f = (sp != co); c = 0; bl = 0;
    if (co && !sp) begin
      if (lsb < maxv) begin lo = lsb + 1; c = 1; end
      else begin mo = 3; bl = 1; end
    end else if (sp && !co) begin
      if (lsb > 0) begin lo = lsb - 1; c = 1; end
      else begin mo = 0; bl = 1; end
    end
  endtask

  initial begin
    en = 2'b11; spec = 0; cout = 0; s_lsb = 0; s_msb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NT); k++) begin
      @(negedge clk);
      if (k >= 2) begin
        int lo, mo;
        bit f, c, bl;
        int j;
        j = k - 2;
        model(hs[j], hc[j], int'(hl[j][0]), int'(hm[j]), 1, lo, mo, f, c, bl);
        checks++;
        if (int'(lo1) != lo || int'(mo1) != mo || fe1 != f || co1 != c || ba1 != bl) begin
          failures++;
          $display("L1: spec=%b cout=%b lsb=%0d msb=%0d -> %0d %0d %b%b%b exp %0d %0d %b%b%b",
                   hs[j], hc[j], hl[j][0], hm[j], lo1, mo1, fe1, co1, ba1, lo, mo, f, c, bl);
        end
        if (f && c && hc[j]) n_corr_up++;
        if (f && c && !hc[j]) n_corr_dn++;
        if (f && bl && hc[j]) n_bal_up++;
        if (f && bl && !hc[j]) n_bal_dn++;
        if (!f) n_pass++;
        model(hs[j], hc[j], int'(hl[j]), int'(hm[j]), 2, lo, mo, f, c, bl);
        checks++;
        if (int'(lo2) != lo || int'(mo2) != mo || fe2 != f || co2 != c || ba2 != bl) begin
          failures++;
          $display("L2: spec=%b cout=%b lsb=%0d msb=%0d -> %0d %0d exp %0d %0d",
                   hs[j], hc[j], hl[j], hm[j], lo2, mo2, lo, mo);
        end
      end
      stim = (k < 64) ? 6'(k) : 6'($urandom);
      hs[k] = stim[5];
      hc[k] = stim[4];
      hl[k] = stim[3:2];
      hm[k] = stim[1:0];
      spec = hs[k]; cout = hc[k]; s_lsb = hl[k]; s_msb = hm[k];
    end
    checks++;
    if (n_corr_up == 0 || n_corr_dn == 0 || n_bal_up == 0 || n_bal_dn == 0 || n_pass == 0) begin
      failures++;
      $display("an action never occurred");
    end
    $display("actions: pass=%0d inc=%0d dec=%0d bal11=%0d bal00=%0d",
             n_pass, n_corr_up, n_corr_dn, n_bal_up, n_bal_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
