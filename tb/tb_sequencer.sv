// tb_sequencer: stores, assigns and plays sparse spectra and checks every
// spectrum packet and sampler trigger that comes out.
//
// 4 slots, 4 steps, 16-word samples, 32 bins.  Covers continuous mode,
// store_sample, store_step to a slot and to the current input, rests,
// clear_sample and play_sample, and the scatter-plus-stream cycle count.
module tb_sequencer;
  import aural_pkg::*;
  localparam int unsigned LOGNB = 5, NB = 32;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;

  pkt_bus #(.W(32)) si (.clk, .rst);
  pkt_bus #(.W(16)) so (.clk, .rst);
  pkt_bus #(.W(8))  sa (.clk, .rst);
  seq_ctrl_t ctrl;
  logic [1:0] step_ptr;

  sequencer #(.NSLOT(4), .NSTEP(4), .NMAX(16), .LOGNB(LOGNB)) dut (
    .clk, .rst, .smp_in(si), .ctrl, .spec_out(so), .sa_out(sa), .step_ptr);

  int checks = 0, failures = 0;
  int spec [$];       // words of complete spectra, NB per spectrum
  int nspec = 0;
  int widx = 0;
  int trig [$];
  assign so.woe = 1'b1;
  assign sa.woe = 1'b1;

  always_ff @(posedge clk) if (!rst) begin
    if (so.re && so.woe) begin
      if (so.start != (widx == 0)) begin failures++; $display("start flag"); end
      spec.push_back(int'(so.data));
      if (widx == NB - 1) begin nspec++; widx = 0; end else widx++;
    end
    if (sa.re && sa.woe) trig.push_back(sa.data);
  end

  task automatic send(input int len, input int tr, input int bin_v [$]);
    si.re <= 1; si.start <= 1; si.data <= {16'(len), 8'h00, 8'(tr)};
    @(posedge clk iff si.woe);
    si.start <= 0;
    for (int i = 0; i < len; i++) begin
      si.data <= {16'(bin_v[2*i]), 16'(bin_v[2*i+1])};
      @(posedge clk iff si.woe);
    end
    si.re <= 0;
    @(negedge clk);
  endtask

  task automatic pulse(input string what);
    @(negedge clk);
    case (what)
      "store_sample": ctrl.store_sample = 1;
      "clear_sample": ctrl.clear_sample = 1;
      "play_sample":  ctrl.play_sample = 1;
      "tempo":        ctrl.tempo = 1;
      "store_step":   ctrl.store_step = 1;
      "store_cur":    begin ctrl.store_step = 1; ctrl.play_sample = 1; end
      "clear_step":   ctrl.clear_step = 1;
      default: ;
    endcase
    @(negedge clk);
    ctrl.store_sample = 0; ctrl.clear_sample = 0; ctrl.play_sample = 0;
    ctrl.tempo = 0; ctrl.store_step = 0; ctrl.clear_step = 0;
  endtask

  task automatic wait_spec(input int n);
    int c = 0;
    while (nspec < n && c < 2000) begin @(posedge clk); c++; end
  endtask

  task automatic check_spec(input int bin_v [$], input string tag);
    int e [NB];
    foreach (e[b]) e[b] = 0;
    for (int i = 0; i < bin_v.size(); i += 2) e[bin_v[i]] += bin_v[i+1];
    checks++;
    if (nspec == 0) begin failures++; $display("%s: no spectrum", tag); return; end
    nspec--;
    foreach (e[b]) begin
      int g;
      g = spec.pop_front();
      if (e[b] != g) begin
        failures++; $display("%s: bin %0d got %0d exp %0d", tag, b, g, e[b]);
      end
    end
  endtask

  int A [$] = '{2, 100, 7, 50, 2, 20};
  int B [$] = '{4, 300};
  int Z [$] = '{};
  longint t0;

  initial begin
    si.re = 0; si.start = 0; si.data = 0; ctrl = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (40) @(posedge clk);            // bin buffer sweep
    // continuous mode: each new input is played
    t0 = $time;
    send(3, 5, A);
    wait_spec(1);
    checks++;
    if (($time - t0) / 10 > 4 + 3 + 3 + NB + 4) begin failures++; $display("slow: %0d", ($time-t0)/10); end
    check_spec(A, "continuous A");
    checks++; if (trig.size() != 1 || trig[0] != 5) begin failures++; $display("trigger A"); end
    trig.delete();
    ctrl.memory_address = 1;
    pulse("store_sample");
    repeat (20) @(posedge clk);
    send(1, 0, B);
    wait_spec(1); check_spec(B, "continuous B");
    // sequencer mode
    ctrl.mode_select = 1;
    ctrl.step_address = 1; ctrl.memory_address = 1; pulse("store_step");
    ctrl.step_address = 2; pulse("store_cur");
    pulse("tempo"); wait_spec(1); check_spec(A, "step1 slot1");
    checks++; if (trig.size() != 1 || trig[0] != 5) begin failures++; $display("trigger slot"); end
    pulse("tempo"); wait_spec(1); check_spec(B, "step2 current");
    pulse("tempo"); wait_spec(1); check_spec(Z, "step3 rest");
    ctrl.memory_address = 1; pulse("clear_sample");
    pulse("tempo"); wait_spec(1); check_spec(Z, "step0 rest");
    pulse("tempo"); wait_spec(1); check_spec(Z, "step1 cleared slot");
    checks++; if (step_ptr != 1) begin failures++; $display("step_ptr %0d", step_ptr); end
    // store B into slot 2, play it directly; then unassign step 2
    ctrl.memory_address = 2; pulse("store_sample");
    repeat (20) @(posedge clk);
    pulse("play_sample"); wait_spec(1); check_spec(B, "play slot2");
    ctrl.step_address = 2; pulse("clear_step");
    pulse("tempo"); wait_spec(1); check_spec(Z, "step2 cleared");
    // two requests back to back: the second waits
    ctrl.step_address = 3; ctrl.memory_address = 2; pulse("store_step");
    pulse("tempo"); pulse("play_sample");
    wait_spec(2); check_spec(B, "queued 1"); check_spec(B, "queued 2");
    repeat (50) @(posedge clk);
    checks++; if (nspec != 0) begin failures++; $display("extra spectra"); end
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
