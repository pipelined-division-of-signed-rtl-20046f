// rns_divider_tb -- end-to-end test of the pipelined residue divider at its
// only configuration.
//
// Sends directed divisions (the worked cases X = 4095 with Y = 127, 191, 319
// and their known quotients 28, 21, 13,
// small divisors on the a = 0 path, Y = -2048, all sign combinations) and
// random divisions whose residue product stays inside the signed range, one
// per clock with random idle cycles in between.  Every result is decoded
// from its residues and compared with the reference quotient; for |Y| >= 64
// it must also lie within 2.5 of the exact X / Y.  Checks that the first
// result appears exactly LATENCY = 8 cycles after its operands, that results
// keep their order, and that reset empties the valid pipe.  Counts how often
// each mechanism occurred (two-term reciprocal, a = 0 bypass, negative
// divisor, negative dividend, divisor clamp, idle bubble) and fails if one
// never did.
module rns_divider_tb;
  import rns_div_pkg::*;
  import div_ref_pkg::*;

  localparam int LAT = 8;
  localparam int N   = 6000;

  logic               clk = 0;
  logic               rst_n = 0;
  logic               in_valid = 0;
  logic signed [11:0] y = '0;
  residue_vec_t       x = '0;
  logic               out_valid;
  residue_vec_t       q;

  int checks = 0, failures = 0;
  int xs [$], ys [$], exps [$];
  int n_worked = 0;
  int n_twoterm = 0, n_azero = 0, n_negy = 0, n_negx = 0, n_clamp = 0, n_bubble = 0;
  int cycle = 0, first_in = -1, first_out = -1, n_out = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  rns_divider dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y(y), .x(x),
                   .out_valid(out_valid), .q(q));

  initial begin
    #(20 * N * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decode a residue vector into the signed integer in [-64, 64) it encodes
  function automatic int decode(input residue_vec_t r, output bit ok);
    for (int v = -64; v < 64; v++) begin
      bit m;
      m = 1;
      for (int i = 0; i < NCH; i++) if (int'(r[i]) != res(longint'(v), MODS[i])) m = 0;
      if (m) begin ok = 1; return v; end
    end
    ok = 0;
    return 0;
  endfunction

  task automatic send(input int xv, input int yv, input int expv = -999);
    @(negedge clk);
    in_valid = 1;
    y = 12'(yv);
    for (int i = 0; i < NCH; i++) x[i] = 5'(res(xv, MODS[i]));
    xs.push_back(xv);
    ys.push_back(yv);
    exps.push_back(expv);
    if (first_in < 0) first_in = cycle;
    if (ref_mag(yv) < 64) n_azero++; else n_twoterm++;
    if (yv < 0) n_negy++;
    if (xv < 0) n_negx++;
    if (yv == -2048) n_clamp++;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0;
    y = 12'($urandom);
    x = residue_vec_t'($urandom);
    n_bubble++;
  endtask

  // results
  always @(negedge clk) begin
    if (out_valid) begin
      int xv, yv, got, expv;
      bit ok;
      longint expq;
      if (first_out < 0) first_out = cycle;
      n_out++;
      checks++;
      if (xs.size() == 0) begin
        failures++;
        $display("FAIL result without operands");
      end else begin
        xv   = xs.pop_front();
        yv   = ys.pop_front();
        expv = exps.pop_front();
        got  = decode(q, ok);
        expq = ref_quot(xv, yv);
        if (!ok || longint'(got) != expq) begin
          failures++;
          if (failures < 10) $display("FAIL X=%0d Y=%0d got=%0d exp=%0d", xv, yv, got, expq);
        end
        if (expv != -999) begin
          n_worked++;
          checks++;
          if (got != expv) begin
            failures++;
            $display("FAIL worked case X=%0d Y=%0d got=%0d expected %0d", xv, yv, got, expv);
          end
        end
        if (ref_mag(yv) >= 64 && xv >= -2048 && xv < 2048) begin
          real e;
          e = real'(got) - real'(xv) / real'(yv);
          if (e < 0) e = -e;
          if (e > max_err) max_err = e;
          checks++;
          if (e > 2.5) begin
            failures++;
            $display("FAIL error %f for X=%0d Y=%0d Q=%0d", e, xv, yv, got);
          end
        end
      end
    end
  end

  initial begin
    int xv, yv;
    // reset: valid pipe cleared even with in_valid held high
    in_valid = 1;
    repeat (12) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid during reset"); end
    in_valid = 0;
    @(negedge clk);
    rst_n = 1;
    repeat (LAT + 2) begin
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid after reset, no input"); end
    end

    // worked cases with the largest unsigned 12-bit dividend 4095:
    // quotients 28, 21 and 13 (exact 32.24, 21.44 and 12.84)
    send(4095, 127, 28);  send(4095, 191, 21);  send(4095, 319, 13);
    send(-4095, 127, -28);
    // directed cases
    send(2047, 127);   send(2047, 191);   send(2047, 319);
    send(-2047, 127);  send(2047, -191);  send(-2048, -319);
    send(2047, 2047);  send(-2048, -2048); send(2047, -2048);
    send(100, 5);      send(-43, 1);      send(1000, -23);
    send(0, 777);      send(0, -1);
    idle(); idle();
    // random in-domain traffic with bubbles
    for (int k = 0; k < N; k++) begin
      do begin
        xv = int'($urandom_range(4095)) - 2048;
        yv = (k % 5 == 0) ? int'($urandom_range(126)) - 63 : int'($urandom_range(4095)) - 2048;
      end while (yv == 0 || !in_domain(xv, yv));
      send(xv, yv);
      if ($urandom_range(7) == 0) idle();
    end
    idle();
    repeat (LAT + 2) @(negedge clk);

    checks++;
    if (first_out - first_in != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", first_out - first_in, LAT);
    end
    checks++;
    if (xs.size() != 0) begin failures++; $display("FAIL %0d results missing", xs.size()); end
    $display("results %0d, latency %0d cycles, max |Q - X/Y| for |Y|>=64: %f", n_out, first_out - first_in, max_err);
    $display("two-term %0d, a=0 bypass %0d, negative Y %0d, negative X %0d, clamp %0d, bubbles %0d",
             n_twoterm, n_azero, n_negy, n_negx, n_clamp, n_bubble);
    checks += 7;
    if (n_worked != 4)  failures++;
    if (n_twoterm == 0) failures++;
    if (n_azero == 0)   failures++;
    if (n_negy == 0)    failures++;
    if (n_negx == 0)    failures++;
    if (n_clamp == 0)   failures++;
    if (n_bubble == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
