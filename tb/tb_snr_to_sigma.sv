// tb_snr_to_sigma: exhaustive test of the Eb/N0 to sigma conversion.
//
// For every Eb/N0 input (1/8 dB steps) the expected sigma is recomputed in
// floating point: Es/N0 = Eb/N0 - 3.0103 dB for the rate 1/2 code, sigma =
// sqrt(1 / (2 Es/N0)), scaled by 256 and limited to 4095.  sigma must match
// within 1 LSB and D within 1 LSB of sigma/2.  Two fixed points are checked
// as well: Eb/N0 = 3.0103 dB makes Es/N0 = 0 dB and sigma = sqrt(1/2), and
// Eb/N0 = 0 dB gives sigma = 1.
import fec_pkg::*;
module tb_snr_to_sigma;
  logic signed [7:0] ebn0;
  sigma_t sigma, d;
  int checks = 0, failures = 0;

  snr_to_sigma dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      real eb, es, s_exp;
      int  s_int;
      ebn0 = 8'(i);
      #1;
      eb    = real'(i) / 8.0;
      es    = 10.0 ** ((eb - 3.0103) / 10.0);
      s_exp = $sqrt(0.5 / es) * 256.0;
      if (s_exp > 4095.0) s_exp = 4095.0;
      s_int = int'(sigma);
      check(real'(s_int) > s_exp - 1.0 && real'(s_int) < s_exp + 1.0,
            $sformatf("Eb/N0 %f dB: sigma %0d, expected %f", eb, sigma, s_exp));
      check(int'(d) >= s_int / 2 - 1 && int'(d) <= s_int / 2 + 1,
            $sformatf("Eb/N0 %f dB: D %0d for sigma %0d", eb, d, sigma));
    end
    ebn0 = 8'sd0; #1;
    check(sigma == 256 && d == 128, "0 dB gives sigma 1.0, D 0.5");
    ebn0 = 8'sd24; #1;     // 3.0 dB, Es/N0 = -0.01 dB
    check(sigma >= 180 && sigma <= 182, $sformatf("3 dB gives sigma near sqrt(1/2): %0d", sigma));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
