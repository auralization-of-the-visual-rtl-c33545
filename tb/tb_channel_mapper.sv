// tb_channel_mapper: feeds IFFT words and sampler sums for several frames,
// remaps one source, and checks every {channel, value} packet and the
// number of packets per frame.  4 sampler units.
module tb_channel_mapper;
  localparam int NS = 4;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(16)) ii (.clk, .rst);
  pkt_bus #(.W(16)) ob (.clk, .rst);
  logic ready = 0, su_valid = 0, map_we = 0;
  logic [7:0] map_addr = 0, map_data = 0;
  logic signed [15:0] su_out [NS];

  channel_mapper #(.NS(NS)) dut (.clk, .rst, .ifft_in(ii), .ready, .su_out, .su_valid,
    .out_bus(ob), .map_we, .map_addr, .map_data);

  int checks = 0, failures = 0;
  int got [$];
  always_ff @(posedge clk) ob.woe <= ($urandom_range(0, 2) != 0);
  always_ff @(posedge clk) if (!rst && ob.re && ob.woe) begin
    got.push_back(int'(ob.start)); got.push_back(int'(ob.data));
  end

  int chan [NS+1];
  initial begin
    ii.re = 0; ii.start = 0; ii.data = 0;
    foreach (chan[i]) chan[i] = i;
    repeat (3) @(posedge clk); rst = 0;
    for (int f = 0; f < 6; f++) begin
      int iv, sv [NS];
      if (f == 3) begin
        @(negedge clk); map_we = 1; map_addr = 2; map_data = 8'd77; chan[2] = 77;
        @(negedge clk); map_we = 0;
      end
      iv = (f == 4) ? 0 : $urandom_range(0, 65535);
      foreach (sv[i]) sv[i] = $urandom_range(0, 65535) - 32768;
      @(negedge clk);
      ii.re = (f != 4); ii.data = 16'(iv); ii.start = 0;   // frame 4: IFFT offers nothing
      ready = 1;
      @(negedge clk); ready = 0; ii.re = 0;
      foreach (sv[i]) su_out[i] = 16'(sv[i]);
      su_valid = 1; @(negedge clk); su_valid = 0;
      repeat (40) @(negedge clk);
      checks++;
      if (got.size() != 4 * (NS + 1)) begin failures++; $display("frame %0d: %0d words", f, got.size() / 2); end
      else for (int s = 0; s <= NS; s++) begin
        int v;
        v = (s == 0) ? iv : (sv[s-1] & 16'hffff);
        checks++;
        if (got[4*s] != 1 || got[4*s+1] != chan[s] || got[4*s+2] != 0 || got[4*s+3] != v) begin
          failures++; $display("frame %0d source %0d: ch %0d val %0d", f, s, got[4*s+1], got[4*s+3]);
        end
      end
      got.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
