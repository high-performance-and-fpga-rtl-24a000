// tb_prediction: checks the three predictor sources: the inter and upsampled inputs are
// passed through when selected, and the intra source regenerates vertical, horizontal
// and DC predictions from the reconstructed neighbours (values computed here).
module tb_prediction;
  import svc_pkg::*;
  logic [1:0] sel, intra_mode;
  pix_t inter_pred [256], base_up [256], rec_top [16], rec_left [16], rec_corner, pred [256];
  logic top_ok, left_ok, pred_ok;
  int checks = 0, failures = 0;
  prediction dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 40; t++) begin
      int dc;
      for (int i = 0; i < 256; i++) begin inter_pred[i] = pix_t'($urandom); base_up[i] = pix_t'($urandom); end
      for (int i = 0; i < 16; i++) begin rec_top[i] = pix_t'($urandom); rec_left[i] = pix_t'($urandom); end
      rec_corner = pix_t'($urandom); top_ok = 1; left_ok = 1;
      dc = 16;
      for (int i = 0; i < 16; i++) dc += rec_top[i] + rec_left[i];
      dc = dc >> 5;
      for (int s = 0; s < 3; s++) for (int m = 0; m < 3; m++) begin
        sel = 2'(s); intra_mode = 2'(m);
        #1;
        for (int i = 0; i < 256; i++) begin
          int e;
          e = (s == 0) ? inter_pred[i] : (s == 2) ? base_up[i] :
              (m == 0) ? rec_top[i % 16] : (m == 1) ? rec_left[i / 16] : dc;
          checks++;
          if (int'(pred[i]) != e) failures++;
        end
        checks++; if (!pred_ok) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
