// tb_apnea_local_r2r: exhaustive check of the router local decision over
// small counter values against an independently written reference.
module tb_apnea_local_r2r;
  import apnea_pkg::*;
  cnt_t r_bw, r_va, r_sa, w_usable;
  decision_e dec;
  int checks = 0, failures = 0;

  apnea_local_r2r dut (.*);

  function automatic decision_e ref_dec(int bw, int va, int sa, int us);
    if (us > 0) return (bw + va <= sa) ? DEC_DOWN : DEC_KEEP;
    return (bw + va > sa) ? DEC_UP : DEC_KEEP;
  endfunction

  initial begin
    for (int bw = 0; bw < 5; bw++)
      for (int va = 0; va < 5; va++)
        for (int sa = 0; sa < 7; sa++)
          for (int us = 0; us < 3; us++) begin
            r_bw = cnt_t'(bw); r_va = cnt_t'(va); r_sa = cnt_t'(sa); w_usable = cnt_t'(us);
            #1;
            checks++;
            if (dec != ref_dec(bw, va, sa, us)) begin
              failures++;
              $display("FAIL bw=%0d va=%0d sa=%0d usable=%0d got %s", bw, va, sa, us, dec.name());
            end
          end
    // saturation corner: sums beyond the counter width must not wrap
    r_bw = 8'd200; r_va = 8'd100; r_sa = 8'd255; w_usable = 8'd0; #1;
    checks++; if (dec != DEC_UP) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
