// hw_input_xlate: maps the board's user controls to sequencer and effects
// controls.
//
// Switches select addresses: sw[3:0] is the sample memory address, sw[7:4]
// the step address; mode_sw selects continuous (0) or sequencer (1) mode.
// Each button (already debounced) gives a one-clock pulse on its rising
// edge: 0 store_sample, 1 clear_sample, 2 play_sample, 3 store_step,
// 4 clear_step, 5 send effect parameter.  The tempo pulse comes from an
// internal divider (period TEMPO_DIV clocks, scaled by 1 + tempo_sel) or,
// with tempo_src = 1, from the video tempo rule.  For the frequency-domain
// effects, fx_sw[0] enables the filter and fx_sw[1] the reverb, and knob
// sets the reverb decay.  Button 5 sends the 32-bit user I/O word
// {unit, parameter, value[15:0]} as a four-byte parameter packet to the
// time-domain effects.  Pure mapping: no memory, outputs one clock after the
// inputs.  The control set follows the design description; the assignment
// of switches and buttons, the tempo divider and the user I/O word are this
// design's own.
module hw_input_xlate
  import aural_pkg::*;
#(
  parameter int unsigned TEMPO_DIV = 8_500_000   // 1/8 s at 68 MHz
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  sw,
  input  logic [5:0]  buttons,
  input  logic        mode_sw,
  input  logic        tempo_src,
  input  logic [2:0]  tempo_sel,
  input  logic        video_tempo,
  input  logic [1:0]  fx_sw,
  input  logic [7:0]  knob,
  input  logic [31:0] user_io,
  output seq_ctrl_t   ctrl,
  output logic        filter_en,
  output logic        reverb_en,
  output logic [7:0]  decay,
  pkt_bus.tx          par_out     // W = 8, 4 words
);
  localparam int unsigned TW = $clog2(TEMPO_DIV * 8 + 1);

  logic [5:0]    bprev, press;
  logic [TW-1:0] tcnt;
  logic          tick;
  logic [31:0]   pword;
  logic [1:0]    pidx;
  logic          psend;

  assign press = buttons & ~bprev;
  assign tick  = (tcnt == '0);

  assign par_out.re    = psend;
  assign par_out.start = (pidx == 2'd0);
  always_comb
    unique case (pidx)
      2'd0: par_out.data = pword[31:24];
      2'd1: par_out.data = pword[23:16];
      2'd2: par_out.data = pword[15:8];
      default: par_out.data = pword[7:0];
    endcase

  always_ff @(posedge clk) begin
    if (rst) begin
      bprev <= '0; tcnt <= '0; ctrl <= '0; filter_en <= 1'b0; reverb_en <= 1'b0; decay <= '0;
      pword <= '0; pidx <= '0; psend <= 1'b0;
    end else begin
      bprev <= buttons;
      tcnt  <= tick ? TW'(TEMPO_DIV * (32'(tempo_sel) + 1) - 1) : tcnt - 1'b1;
      ctrl.memory_address <= sw[3:0];
      ctrl.step_address   <= sw[7:4];
      ctrl.mode_select    <= mode_sw;
      ctrl.store_sample   <= press[0];
      ctrl.clear_sample   <= press[1];
      ctrl.play_sample    <= press[2];
      ctrl.store_step     <= press[3];
      ctrl.clear_step     <= press[4];
      ctrl.tempo          <= tempo_src ? video_tempo : tick;
      filter_en <= fx_sw[0];
      reverb_en <= fx_sw[1];
      decay     <= knob;
      if (press[5] && !psend) begin
        pword <= user_io; pidx <= '0; psend <= 1'b1;
      end else if (psend && par_out.woe) begin
        pidx <= pidx + 1'b1;
        if (pidx == 2'd3) psend <= 1'b0;
      end
    end
  end
endmodule
