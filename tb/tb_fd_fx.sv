// tb_fd_fx: streams spectra through the frequency-domain effects and checks
// each output bin against a model of the filter and the decaying FIR reverb.
// 256 bins, R = 4, random back-pressure on the output.  Five packets: the
// first with effects off, then a programmed response, then reverb on.
module tb_fd_fx;
  localparam int unsigned LOGNB = 8, NB = 256, R = 4;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(16)) ib (.clk, .rst);
  pkt_bus #(.W(16)) ob (.clk, .rst);
  logic filter_en = 0, reverb_en = 0, resp_we = 0;
  logic [7:0] decay = 8'd128, resp_addr = 0, resp_data = 0;

  fd_fx #(.LOGNB(LOGNB), .R(R)) dut (.clk, .rst, .in_bus(ib), .out_bus(ob),
    .filter_en, .reverb_en, .decay, .resp_we, .resp_addr, .resp_data);

  int checks = 0, failures = 0;
  int H [256];
  int past [$];          // dry spectra, NB words each, newest last
  int expq [$];
  int oi = 0;

  always_ff @(posedge clk) ob.woe <= ($urandom_range(0, 3) != 0);

  always_ff @(posedge clk) if (!rst && ob.re && ob.woe) begin
    int e;
    e = expq.pop_front();
    checks++;
    if (ob.start != (oi == 0)) begin failures++; $display("start flag at %0d", oi); end
    if (int'(ob.data) != e) begin failures++; if (failures < 10) $display("%0t bin %0d got %0d exp %0d", $time, oi, ob.data, e); end
    oi = (oi + 1) % NB;
  end

  task automatic send_packet();
    int x [NB];
    int dry [NB];
    int npast;
    npast = past.size() / NB;
    foreach (x[b]) begin
      longint wet, s;
      int c;
      x[b] = $urandom_range(0, 40000);
      dry[b] = filter_en ? (x[b] * (H[b] + 1)) >> 8 : x[b];
      wet = 0; c = 256;
      for (int j = 1; j <= R; j++) begin
        c = (c * decay) >> 8;
        if (reverb_en && j <= npast) wet += longint'(past[(npast - j) * NB + b]) * c;
      end
      s = dry[b] + (wet >> 8);
      expq.push_back(s > 65535 ? 65535 : int'(s));
    end
    foreach (dry[b]) past.push_back(dry[b]);
    if (past.size() > R * NB) repeat (NB) void'(past.pop_front());
    for (int b = 0; b < NB; b++) begin
      ib.re <= 1; ib.start <= (b == 0); ib.data <= 16'(x[b]);
      @(posedge clk iff ib.woe);
    end
    ib.re <= 0; ib.start <= 0;
    @(negedge clk);
  endtask

  initial begin
    ib.re = 0; ib.start = 0; ib.data = 0;
    foreach (H[i]) H[i] = 255;
    repeat (3) @(posedge clk); rst = 0;
    send_packet();
    // program a band-pass style response
    for (int i = 0; i < 256; i++) begin
      H[i] = (i < 40) ? 0 : (i < 200) ? 255 : 64;
      resp_we <= 1; resp_addr <= 8'(i); resp_data <= 8'(H[i]);
      @(posedge clk);
    end
    resp_we <= 0;
    filter_en = 1;
    send_packet();
    reverb_en = 1;
    send_packet(); send_packet(); send_packet(); send_packet();
    repeat (50) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("missing %0d outputs", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
