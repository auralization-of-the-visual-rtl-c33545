// tb_pkt_bus: a sender and a receiver joined by one 16-bit pkt_bus, both
// stalling at random.  The sender holds each word until it is taken (the
// interface's assertion watches this); the receiver records words on
// re && woe.  Checks that 300 words of full width, with their start marks,
// arrive once each and in order.
module tb_pkt_bus;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(16)) b (.clk, .rst);

  int checks = 0, failures = 0;
  logic [16:0] sent [$], got [$];

  // receiver
  always_ff @(posedge clk) begin
    b.woe <= ($urandom_range(0, 2) != 0);
    if (b.re && b.woe) got.push_back({b.start, b.data});
  end

  initial begin
    b.re = 0; b.start = 0; b.data = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      logic [16:0] w;
      w = {1'(i % 10 == 0), 16'($urandom) | 16'h8000};
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk); b.re = 0; repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      @(negedge clk); b.re = 1; b.start = w[16]; b.data = w[15:0];
      sent.push_back(w);
      @(posedge clk iff b.woe);      // taken on this edge
    end
    @(negedge clk); b.re = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("got %0d of %0d words", got.size(), sent.size()); end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; if (failures < 5) $display("word %0d: %h exp %h", i, got[i], sent[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
