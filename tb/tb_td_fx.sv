// tb_td_fx: drives channel values and parameter packets into the
// time-domain effects and checks left/right every frame against a model
// of the patchboard (one frame per unit) and of the FIR, gain (with the
// control-channel compressor mode), mixdown and echo units.  The routing is
// changed twice so that all four units reach an output, and the mixdown is
// chained into the echo.
module tb_td_fx;
  localparam int E = 16;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(16)) ci (.clk, .rst);
  pkt_bus #(.W(8))  pi (.clk, .rst);
  logic ready = 0, out_re;
  logic [15:0] left, right;

  td_fx #(.EDEPTH(E)) dut (.clk, .rst, .ch_in(ci), .par_in(pi), .ready, .left, .right, .out_re);

  int checks = 0, failures = 0;
  // model state
  longint chv [20];
  int route [8];
  longint fc [8], fh [8];
  longint gg, gmode, genv, ma, mb, edel, efb, ewet, ewp;
  longint emem [E];

  function automatic longint sat(input longint v);
    return v > 32767 ? 32767 : v < -32767 ? -32767 : v;
  endfunction
  function automatic longint sk(input int s);
    return chv[route[s]];
  endfunction

  task automatic par(input int unit, input int num, input int v);
    int w [4];
    w = '{unit, num, (v >> 8) & 255, v & 255};
    for (int i = 0; i < 4; i++) begin
      pi.re <= 1; pi.start <= (i == 0); pi.data <= 8'(w[i]);
      @(posedge clk iff pi.woe);
    end
    pi.re <= 0; pi.start <= 0;
    case (unit)
      255: route[num] = v;
      16: fc[num] = longint'(shortint'(v));
      17: if (num == 0) gg = shortint'(v); else gmode = v & 1;
      18: if (num == 0) ma = shortint'(v); else mb = shortint'(v);
      19: if (num == 0) edel = v; else if (num == 1) efb = v; else ewet = v;
      default: ;
    endcase
  endtask

  task automatic chan(input int c, input int v);
    ci.re <= 1; ci.start <= 1; ci.data <= 16'(c);
    @(posedge clk iff ci.woe);
    ci.start <= 0; ci.data <= 16'(v);
    @(posedge clk iff ci.woe);
    ci.re <= 0;
    chv[c] = longint'(shortint'(v));
  endtask

  task automatic frame();
    longint x, fir, gp, gs, mix, d, ey, ew, el, er, ab;
    el = sk(6); er = sk(7);
    x = sk(0); fir = x * fc[0];
    for (int t = 1; t < 8; t++) fir += fh[t-1] * fc[t];
    for (int t = 7; t > 0; t--) fh[t] = fh[t-1];
    fh[0] = x;
    gs = gmode ? 32768 - (genv >> 1) : 32768;
    gp = (((sk(1) * gg) >>> 8) * gs) >>> 15;
    ab = sk(2) < 0 ? -sk(2) : sk(2);
    genv = (genv - (genv >> 6) + (ab >> 6)) & 65535;
    mix = (sk(3) * ma + sk(4) * mb) >>> 8;
    d = emem[(ewp - edel) & (E - 1)];
    ey = sk(5) + ((d * ewet) >>> 8);
    ew = sk(5) + ((d * efb) >>> 8);
    emem[ewp] = sat(ew); ewp = (ewp + 1) & (E - 1);
    chv[16] = sat(fir >>> 15); chv[17] = sat(gp); chv[18] = sat(mix); chv[19] = sat(ey);
    @(negedge clk); ready = 1; @(negedge clk); ready = 0;
    checks += 2;
    if (!out_re) begin failures++; $display("no out_re"); end
    if (longint'($signed(left)) != el || longint'($signed(right)) != er) begin
      failures++;
      if (failures < 10) $display("L %0d exp %0d  R %0d exp %0d (routes %0d %0d)", $signed(left), el, $signed(right), er, route[6], route[7]);
    end
  endtask

  initial begin
    ci.re = 0; ci.start = 0; ci.data = 0; pi.re = 0; pi.start = 0; pi.data = 0;
    foreach (chv[i]) chv[i] = 0;
    foreach (route[i]) route[i] = 0;
    foreach (fc[i]) begin fc[i] = 0; fh[i] = 0; end
    foreach (emem[i]) emem[i] = 0;
    fc[0] = 32767; gg = 256; gmode = 0; genv = 0; ma = 128; mb = 128;
    edel = E / 2; efb = 0; ewet = 128; ewp = 0;
    repeat (3) @(posedge clk); rst = 0;
    repeat (E + 4) @(posedge clk);
    // routing and parameters
    par(255, 0, 1); par(255, 1, 0); par(255, 2, 0); par(255, 3, 0); par(255, 4, 1);
    par(255, 5, 18);                  // echo fed by the mixdown: a chain
    par(255, 6, 16); par(255, 7, 17);
    par(16, 0, 16384); par(16, 1, 8192); par(16, 2, 16'hf000); par(16, 5, 3000);
    par(17, 0, 384); par(17, 1, 1);   // compressor: gain controlled by its own input
    par(18, 0, 200); par(18, 1, 16'hff80);
    par(19, 0, 3); par(19, 1, 100); par(19, 2, 200);
    for (int f = 0; f < 90; f++) begin
      if (f == 30) begin par(255, 6, 18); par(255, 7, 19); end
      if (f == 60) begin par(255, 6, 0); par(255, 7, 1); end
      chan(0, $urandom_range(0, 65535));
      chan(1, $urandom_range(0, 65535));
      frame();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
