// tb_threefold_fir: random coefficients (two sets) and random samples on 4
// slots; a floating-free integer model of decimate -> bandpass -> Hilbert
// (same Q1.15 scaling, floor rounding and saturation) predicts every Re/Im
// output bit-exactly. Also checked: the job latency of
// N_DEC + N_BPF + N_HT clocks from the decimating sample to out_valid, the
// slot tag, and that samples arriving faster than a job raise 'overrun'.
module tb_threefold_fir;
  localparam int NCH = 4, DEC = 4, ND = 4, NB = 8, NH = 8, HD = 3, NSET = 2;
  localparam int SMP_W = 10, IW = 16, CW = 16;
  localparam int CD = ND + NSET * (NB + NH);
  localparam int SH = IW - SMP_W;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [1:0] in_slot = 0;
  logic signed [SMP_W-1:0] in_data = 0;
  logic [0:0] set_sel [NCH];
  logic coef_we = 0;
  logic [$clog2(CD)-1:0] coef_addr = 0;
  logic signed [CW-1:0] coef_wdata = 0;
  logic out_valid;
  logic [1:0] out_slot;
  logic signed [SMP_W-1:0] out_re, out_im;
  logic busy, overrun;

  threefold_fir #(.NCH(NCH), .DEC(DEC), .N_DEC(ND), .N_BPF(NB), .N_HT(NH), .HT_DELAY(HD),
                  .NSET(NSET), .SMP_W(SMP_W), .IW(IW), .COEF_W(CW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int coefs [CD];
  int xh [NCH][$], bh [NCH][$], hh [NCH][$];   // model histories, newest first
  int nin [NCH];
  int exp_re [$], exp_im [$], exp_slot [$], exp_t [$];
  int t = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int sat(longint acc);
    longint s = acc >>> (CW - 1);
    if (s > 2**(IW-1) - 1) return 2**(IW-1) - 1;
    if (s < -(2**(IW-1)))  return -(2**(IW-1));
    return int'(s);
  endfunction

  function automatic int fir(int q [$], int base, int n);
    longint acc = 0;
    for (int k = 0; k < n; k++) acc += longint'(coefs[base + k]) * longint'(q[k]);
    return sat(acc);
  endfunction

  // model: push one sample of slot c; returns 1 when an output is due
  task automatic model(int c, int x);
    int d, b, h, base;
    xh[c].push_front(x <<< SH);
    void'(xh[c].pop_back());
    nin[c]++;
    if (nin[c] % DEC == 0) begin
      base = ND + int'(set_sel[c]) * (NB + NH);
      d = fir(xh[c], 0, ND);
      bh[c].push_front(d); void'(bh[c].pop_back());
      b = fir(bh[c], base, NB);
      hh[c].push_front(b); void'(hh[c].pop_back());
      h = fir(hh[c], base + NB, NH);
      exp_re.push_back(hh[c][HD] >>> SH);
      exp_im.push_back(h >>> SH);
      exp_slot.push_back(c);
      // out_valid is set N_DEC+N_BPF+N_HT edges after the sample edge and
      // seen here one edge later
      exp_t.push_back(t + ND + NB + NH + 1);
    end
  endtask

  always @(posedge clk) begin
    t <= t + 1;
    if (rst_n && out_valid) begin
      check(exp_re.size() > 0, "unexpected output");
      if (exp_re.size() > 0) begin
        int er, ei, es, et;
        er = exp_re.pop_front(); ei = exp_im.pop_front();
        es = exp_slot.pop_front(); et = exp_t.pop_front();
        check(int'(out_slot) == es, "slot");
        check(int'(out_re) == er, $sformatf("re %0d expected %0d", out_re, er));
        check(int'(out_im) == ei, $sformatf("im %0d expected %0d", out_im, ei));
        check(t == et, $sformatf("latency: output at %0d expected %0d", t, et));
      end
    end
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin
      set_sel[c] = 1'(c % 2);
      nin[c] = 0;
      repeat (ND) xh[c].push_back(0);
      repeat (NB) bh[c].push_back(0);
      repeat (NH) hh[c].push_back(0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (NCH * NB + 5) @(posedge clk);     // delay-line clear
    for (int i = 0; i < CD; i++) begin
      @(negedge clk);
      coefs[i] = $urandom_range(0, 20000) - 10000;
      if (i == 1) coefs[i] = 32767;              // a large tap to reach saturation
      coef_we = 1; coef_addr = ($clog2(CD))'(i); coef_wdata = CW'(coefs[i]);
    end
    @(negedge clk);
    coef_we = 0;
    // 200 rounds over the 4 slots, 25 clocks apart (a job takes 20)
    for (int r = 0; r < 200; r++) begin
      for (int c = 0; c < NCH; c++) begin
        int x;
        x = (r < 100) ? $urandom_range(0, 1023) - 512 : ((r % 8) < 4 ? 511 : -512);
        @(negedge clk);
        in_valid = 1; in_slot = 2'(c); in_data = SMP_W'(x);
        model(c, x);
        @(negedge clk);
        in_valid = 0;
        repeat (23) @(negedge clk);
      end
    end
    repeat (40) @(negedge clk);
    check(exp_re.size() == 0, "all outputs seen");
    check(!overrun, "no overrun at 25-clock spacing");
    // back-to-back samples: the 4th of every slot starts a job while one runs
    for (int i = 0; i < 4 * NCH; i++) begin
      @(negedge clk);
      in_valid = 1; in_slot = 2'(i % NCH); in_data = '0;
    end
    @(negedge clk);
    in_valid = 0;
    check(overrun, "overrun flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
