// Self-checking test of mod_select_mux: random branch outputs, every sel
// value, the selected valid and I/Q values of both antennas checked.
module tb_mod_select_mux;
  import ofdm_tx_pkg::*;

  mod_e       sel;
  logic [3:0] in_valid;
  iq_t        in_x [4], in_y [4];
  logic       out_valid;
  iq_t        out_x, out_y;
  int         checks = 0, failures = 0;

  mod_select_mux dut (.*);

  initial begin
    for (int n = 0; n < 200; n++) begin
      sel      = mod_e'($urandom % 4);
      in_valid = 4'($urandom);
      for (int b = 0; b < 4; b++) begin
        in_x[b] = iq_t'($urandom);
        in_y[b] = iq_t'($urandom);
      end
      #1;
      checks++;
      if (out_valid !== in_valid[sel] || out_x !== in_x[sel] || out_y !== in_y[sel]) begin
        failures++;
        $display("sel %0d: wrong selection", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
