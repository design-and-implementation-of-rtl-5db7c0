// Self-checking test of alpha_blend3. For the opaque and transparent levels
// the result must be the graphics or the video pixel exactly. For every other
// alpha each channel must equal the shift-and-add sum written out with
// integer divisions, and lie within 7 of (seven truncated terms) 0.3*g + 0.7*v. Sweeps all alpha
// values and random colours.
module tb_alpha_blend3;
  import mhp_pkg::*;
  argb_t gfx, vid, res;
  int checks = 0, failures = 0;

  alpha_blend3 dut (.gfx(gfx), .vid(vid), .res(res));

  function automatic int ref30(int g, int v);
    return g/4 + g/32 + g/64 + v/2 + v/8 + v/16 + v/64;
  endfunction

  task automatic check_channel(string nm, int g, int v, int got, int a);
    int exp;
    real exact;
    if (a == 255)      exp = g;
    else if (a == 0)   exp = v;
    else               exp = ref30(g, v);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s a=%0d g=%0d v=%0d got %0d exp %0d", nm, a, g, v, got, exp);
    end
    if (a != 0 && a != 255) begin
      exact = 0.3 * g + 0.7 * v;
      checks++;
      if (real'(got) < exact - 7.0 || real'(got) > exact + 7.0) begin
        failures++;
        $display("%s off 30%% blend: g=%0d v=%0d got %0d", nm, g, v, got);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int n = 0; n < 64; n++) begin
        gfx = argb_t'($urandom); gfx.a = 8'(a);
        vid = argb_t'($urandom);
        if (n == 0) begin gfx.r = 8'hFF; vid.r = 8'hFF; gfx.g = 0; vid.g = 0; end
        #1;
        if (a == 255) begin
          checks++; if (res !== gfx) begin failures++; $display("opaque a=%0d", a); end
        end else if (a == 0) begin
          checks++; if (res !== vid) begin failures++; $display("transparent"); end
        end else
          check_channel("A", int'(gfx.a), int'(vid.a), int'(res.a), a);
        check_channel("R", int'(gfx.r), int'(vid.r), int'(res.r), a);
        check_channel("G", int'(gfx.g), int'(vid.g), int'(res.g), a);
        check_channel("B", int'(gfx.b), int'(vid.b), int'(res.b), a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
