// tb_conj_pair_mult: checks x*t and x*conj(t) against real-valued products
// for random operands, including full-scale corners.
module tb_conj_pair_mult;
  localparam int unsigned W = 32, TW = 16;
  logic signed [W-1:0]  x_re, x_im, pos_re, pos_im, neg_re, neg_im;
  logic signed [TW-1:0] t_re, t_im;
  int checks = 0, failures = 0;

  conj_pair_mult #(.W(W), .TW(TW)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input real a, input real b);
    return (a - b < 1.01) && (b - a < 1.01);
  endfunction

  initial begin
    real xr, xi, tr, ti, epr, epi, enr, eni;
    for (int n = 0; n < 2000; n++) begin
      x_re = $signed($urandom) >>> ($urandom_range(12, 2));
      x_im = $signed($urandom) >>> ($urandom_range(12, 2));
      t_re = TW'($urandom);
      t_im = TW'($urandom);
      if (n == 0) begin t_re = 16'sh7fff; t_im = -16'sh8000; end
      #1;
      xr = real'(x_re); xi = real'(x_im);
      tr = real'(t_re) / 32768.0; ti = real'(t_im) / 32768.0;
      epr = xr * tr - xi * ti; epi = xr * ti + xi * tr;
      enr = xr * tr + xi * ti; eni = xi * tr - xr * ti;
      checks++;
      if (!(near(real'(pos_re), epr) && near(real'(pos_im), epi) &&
            near(real'(neg_re), enr) && near(real'(neg_im), eni))) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=(%0d,%0d) t=(%0d,%0d): pos=(%0d,%0d) exp (%f,%f) neg=(%0d,%0d) exp (%f,%f)",
                   x_re, x_im, t_re, t_im, pos_re, pos_im, epr, epi, neg_re, neg_im, enr, eni);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
