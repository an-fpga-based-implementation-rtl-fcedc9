// energy_sum_tb - checks the global energy summation with strip energies
// built from random column energies (real-valued cos/sin weights), plus
// hand-made cases: zero vector, vectors along each axis, maximum energy.
// Total Et and missing Et magnitude are checked exactly; the direction
// sector is checked from $atan2 except within 0.3 degrees of a sector
// boundary, where the Q10 boundary directions may legitimately decide
// either way. Latency: 5 cycles.
module energy_sum_tb;
  import gct_pkg::*;
  import jet_ref_pkg::*;

  localparam int NSRC = 9, LAT = 5, NEV = 600;

  logic clk = 0, rst = 1;
  logic [15:0] et_in [NSRC];
  logic signed [31:0] ex_in [NSRC], ey_in [NSRC];
  logic [19:0] et_tot;
  logic [20:0] met;
  logic [5:0] met_phi;

  typedef struct { longint et; longint mag; int sec; bit sec_ok; } exp_t;
  exp_t expq [$];
  int checks = 0, failures = 0, near = 0;

  energy_sum dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t model();
    exp_t r;
    longint sx, sy, mx, my, m;
    real ang, fr;
    r.et = 0; sx = 0; sy = 0;
    for (int i = 0; i < NSRC; i++) begin
      r.et += et_in[i]; sx += ex_in[i]; sy += ey_in[i];
    end
    // arithmetic shift right by 10 (floor), then negate
    mx = -((sx >= 0) ? sx / 1024 : -((-sx + 1023) / 1024));
    my = -((sy >= 0) ? sy / 1024 : -((-sy + 1023) / 1024));
    m = longint'($sqrt(real'(mx * mx + my * my)));
    while (m * m > mx * mx + my * my) m--;
    while ((m + 1) * (m + 1) <= mx * mx + my * my) m++;
    r.mag = m;
    if (mx == 0 && my == 0) begin
      r.sec = 0; r.sec_ok = 1;
    end else begin
      ang = $atan2(real'(my), real'(mx)) * 180.0 / PI;
      if (ang < 0) ang += 360.0;
      r.sec = int'($floor(ang / 10.0)) % 36;
      fr = ang - 10.0 * $floor(ang / 10.0);
      r.sec_ok = (fr > 0.3 && fr < 9.7);
    end
    return r;
  endfunction

  initial begin
    exp_t x;
    foreach (et_in[i]) begin et_in[i] = '0; ex_in[i] = '0; ey_in[i] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int cyc = 0; cyc < NEV + LAT; cyc++) begin
      @(negedge clk);
      if (cyc >= LAT) begin
        x = expq.pop_front();
        checks += 2;
        if (et_tot != 20'(x.et)) begin failures++; $display("et %0d want %0d", et_tot, x.et); end
        if (met != 21'(x.mag)) begin failures++; $display("met %0d want %0d", met, x.mag); end
        if (x.sec_ok) begin
          checks++;
          if (met_phi != 6'(x.sec)) begin failures++; $display("phi %0d want %0d", met_phi, x.sec); end
        end else near++;
      end
      for (int i = 0; i < NSRC; i++) begin
        int c0, c1, k;
        k = 2 * i;
        c0 = (cyc % 13 == 5) ? 22 * 1023 : $urandom_range(22 * 1023) >> ($urandom_range(3) * 3);
        c1 = (cyc % 13 == 5) ? 22 * 1023 : $urandom_range(22 * 1023) >> ($urandom_range(3) * 3);
        et_in[i] = 16'(c0 + c1);
        ex_in[i] = c0 * q10cos(10.0 * (k + 1)) + c1 * q10cos(10.0 * (k + 3));
        ey_in[i] = c0 * q10sin(10.0 * (k + 1)) + c1 * q10sin(10.0 * (k + 3));
        if (cyc % 17 == 2) begin et_in[i] = '0; ex_in[i] = '0; ey_in[i] = '0; end
        if (cyc % 17 == 4) begin ex_in[i] = 32'(1024 * (i + 1)); ey_in[i] = '0; end
        if (cyc % 17 == 6) begin ex_in[i] = '0; ey_in[i] = -32'(2048 * (i + 1)); end
      end
      expq.push_back(model());
    end
    $display("sector checks skipped near boundaries: %0d", near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
