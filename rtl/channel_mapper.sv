// channel_mapper: merges the synthesiser and the sampler into one stream of
// channel-addressed audio values for the time-domain effects.
//
// On each audio frame tick (`ready`) it takes one word from the IFFT output
// bus (zero if none is offered).  When the sampler then presents its NS
// unit sums (su_valid), it sends NS+1 packets of two 16-bit words,
// {8'h00, channel} then value: source 0 is the IFFT, source i is sampler
// unit i.  A source-to-channel table (reset to the identity, written
// through map_we/map_addr/map_data) keeps the effects' channel numbers
// independent of the sources.  Timing: 2*(NS+1) words per frame at one word
// per clock when not stalled.  The packet format and the lookup table follow
// the design description; taking the IFFT word on `ready` is this design's.
module channel_mapper #(
  parameter int unsigned NS = 15
) (
  input  logic              clk,
  input  logic              rst,
  pkt_bus.rx                ifft_in,   // W = 16
  input  logic              ready,
  input  logic signed [15:0] su_out [NS],
  input  logic              su_valid,
  pkt_bus.tx                out_bus,   // W = 16
  input  logic              map_we,
  input  logic [7:0]        map_addr,
  input  logic [7:0]        map_data
);
  localparam int unsigned SW = $clog2(NS + 1);

  logic [7:0]  chmap [NS+1];
  logic [15:0] val [NS+1];
  logic [SW-1:0] src;
  logic        word2;
  logic        sending;

  assign ifft_in.woe   = ready;
  assign out_bus.re    = sending;
  assign out_bus.start = !word2;
  assign out_bus.data  = word2 ? val[src] : {8'h00, chmap[src]};

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= NS; i++) begin chmap[i] <= 8'(i); val[i] <= '0; end
      src <= '0; word2 <= 1'b0; sending <= 1'b0;
    end else begin
      if (map_we && map_addr <= 8'(NS)) chmap[SW'(map_addr)] <= map_data;
      if (ready) val[0] <= ifft_in.re ? ifft_in.data : 16'd0;
      if (su_valid && !sending) begin
        for (int i = 0; i < NS; i++) val[i+1] <= su_out[i];
        sending <= 1'b1; src <= '0; word2 <= 1'b0;
      end else if (sending && out_bus.woe) begin
        word2 <= !word2;
        if (word2) begin
          if (src == SW'(NS)) sending <= 1'b0;
          else src <= src + 1'b1;
        end
      end
    end
  end
endmodule
