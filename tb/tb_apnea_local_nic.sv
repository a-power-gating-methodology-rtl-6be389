// tb_apnea_local_nic: exhaustive check of the NIC local decision over small
// counter values against an independently written reference.
module tb_apnea_local_nic;
  import apnea_pkg::*;
  cnt_t r_va, r_sa, w_usable;
  decision_e dec;
  int checks = 0, failures = 0;

  apnea_local_nic dut (.*);

  function automatic decision_e ref_dec(int va, int sa, int us);
    bit none = (va == 0 && sa == 0);
    if (us > 0) return (va < sa || none) ? DEC_DOWN : DEC_KEEP;
    return (va >= sa && !none) ? DEC_UP : DEC_KEEP;
  endfunction

  initial begin
    for (int va = 0; va < 6; va++)
      for (int sa = 0; sa < 6; sa++)
        for (int us = 0; us < 3; us++) begin
          r_va = cnt_t'(va); r_sa = cnt_t'(sa); w_usable = cnt_t'(us);
          #1;
          checks++;
          if (dec != ref_dec(va, sa, us)) begin
            failures++;
            $display("FAIL va=%0d sa=%0d usable=%0d got %s", va, sa, us, dec.name());
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
