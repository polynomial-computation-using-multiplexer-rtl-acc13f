// tb_horner_core - checks the cascade of Horner stages two ways.
// 1. Bit-exact: random stage configurations and random input bits, compared every step
//    with a reference cascade written here.
// 2. Statistical: the e^-x configuration (1 - x(1 - (x/2)(1 - x/3))) driven by
//    independent Bernoulli streams from $urandom for 40000 steps; the fraction of ones
//    must match the polynomial within 0.015.
module tb_horner_core;
  import sc_poly_pkg::*;
  core_cfg_t cfg;
  logic [NSTAGES-1:0] x_bits, a_bits, c_bits, h_bits;
  logic y_bit;
  int checks = 0, failures = 0;

  horner_core dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_core(core_cfg_t c, logic [NSTAGES-1:0] xb, ab, cb, hb);
    logic v, p;
    v = 1'b1;
    for (int k = 0; k < NSTAGES; k++) begin
      p = (c[k].use_x ? xb[k] : 1'b1) & cb[k] & v;
      case (c[k].mode)
        ST_MUL:  v = p;
        ST_ADD:  v = hb[k] ? ab[k] : p;
        ST_SUB:  v = ab[k] & ~p;
        default: ;
      endcase
    end
    return v;
  endfunction

  function automatic logic bern(real p);
    return real'($urandom_range(0, 999999)) < p * 1.0e6;
  endfunction

  initial begin : main
    int ones;
    real xr, expv, frac, pa[NSTAGES], pc[NSTAGES];
    // 1. bit-exact
    for (int i = 0; i < 20000; i++) begin
      for (int k = 0; k < NSTAGES; k++) begin
        cfg[k].mode  = stage_mode_e'($urandom_range(0, 3));
        cfg[k].use_x = 1'($urandom);
        cfg[k].a     = CW'($urandom);
        cfg[k].c     = CW'($urandom);
      end
      x_bits = NSTAGES'($urandom); a_bits = NSTAGES'($urandom);
      c_bits = NSTAGES'($urandom); h_bits = NSTAGES'($urandom);
      #1;
      checks++;
      if (y_bit !== ref_core(cfg, x_bits, a_bits, c_bits, h_bits)) begin
        failures++;
        if (failures < 10) $display("FAIL bit-exact step %0d", i);
      end
    end
    // 2. statistical, e^-x configuration
    for (int k = 0; k < NSTAGES; k++) begin
      cfg[k] = '{mode: ST_PASS, use_x: 1'b0, a: '0, c: '0};
      pa[k] = 0.0; pc[k] = 0.0;
    end
    cfg[0] = '{mode: ST_SUB, use_x: 1'b1, a: K_ONE, c: K_THIRD}; pa[0] = 1.0; pc[0] = 1.0/3.0;
    cfg[1] = '{mode: ST_SUB, use_x: 1'b1, a: K_ONE, c: K_HALF};  pa[1] = 1.0; pc[1] = 0.5;
    cfg[2] = '{mode: ST_SUB, use_x: 1'b1, a: K_ONE, c: K_ONE};   pa[2] = 1.0; pc[2] = 1.0;
    for (int j = 0; j < 5; j++) begin
      xr = 0.2 * real'(j) + 0.1;
      ones = 0;
      for (int t = 0; t < 40000; t++) begin
        for (int k = 0; k < NSTAGES; k++) begin
          x_bits[k] = bern(xr); a_bits[k] = bern(pa[k]);
          c_bits[k] = bern(pc[k]); h_bits[k] = bern(0.5);
        end
        #1;
        ones += int'(y_bit);
      end
      frac = real'(ones) / 40000.0;
      expv = 1.0 - xr + xr*xr/2.0 - xr*xr*xr/6.0;
      checks++;
      if (frac - expv > 0.015 || expv - frac > 0.015) begin
        failures++;
        $display("FAIL e^-x x=%f: %f expected %f", xr, frac, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
