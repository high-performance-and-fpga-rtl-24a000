// tb_recon: random predictions and residuals, including ones that overflow either end,
// checked against pred + residual clipped to 0..255.
module tb_recon;
  import svc_pkg::*;
  pix_t pred [16], rec [16];
  coef_t res [16];
  int checks = 0, failures = 0;
  recon dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 16; k++) begin pred[k] = pix_t'($urandom); res[k] = coef_t'($urandom_range(0, 700) - 350); end
      #1;
      for (int k = 0; k < 16; k++) begin
        int e;
        e = int'(pred[k]) + int'(res[k]);
        e = e > 255 ? 255 : e < 0 ? 0 : e;
        checks++;
        if (int'(rec[k]) != e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
