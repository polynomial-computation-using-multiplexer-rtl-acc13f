// tb_horner_stage - exhaustive check of one Horner stage: every mode, with and without
// the x factor, and every combination of the five input bits, against the truth table
// of the stage's arithmetic meaning (product, half-weighted sum, complement-product).
module tb_horner_stage;
  import sc_poly_pkg::*;
  stage_cfg_t cfg;
  logic v_in, x_bit, a_bit, c_bit, h_bit, v_out;
  int checks = 0, failures = 0;

  horner_stage dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic prod, expv;
    for (int m = 0; m < 4; m++)
      for (int ux = 0; ux < 2; ux++)
        for (int b = 0; b < 32; b++) begin
          cfg.mode  = stage_mode_e'(m);
          cfg.use_x = ux[0];
          cfg.a     = CW'($urandom);
          cfg.c     = CW'($urandom);
          {v_in, x_bit, a_bit, c_bit, h_bit} = b[4:0];
          #1;
          // the product term: x (when used) times c times the inner value
          prod = (ux == 0 || x_bit) && c_bit && v_in;
          case (m)
            0: expv = v_in;
            1: expv = prod;
            2: expv = h_bit ? a_bit : prod;
            default: expv = a_bit && !prod;
          endcase
          checks++;
          if (v_out !== expv) begin
            failures++;
            $display("FAIL mode %0d use_x %0d bits %05b: got %b expected %b", m, ux, b[4:0],
                     v_out, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
