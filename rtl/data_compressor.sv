// data_compressor: sequential quasi-logarithmic compressor of a particle
// count word into an 8-bit code.
//
// Small counts are kept exactly and large ones lose resolution roughly as
// the square root of the count, turning logarithmic near 2 % resolution.
// The code is the position of the most significant one (the
// "characteristic", of variable length) followed by the bits that come after
// that one (the "mantissa", 3 to 6 bits). Three input widths are supported:
// 14, 15 and 16 bits (mode), each with its own map.
//
// How it works: on start the input shift register loads the word aligned so
// that the mode's top bit is at its top, and the state machine is preset to
// the code of that top position. Each following cycle, while the top bit is
// zero, the register shifts left one place and the state machine steps to
// the code of the next lower position. When the top bit is one, or the
// state has reached 00000 (the linear range, counts below 8), the bit
// shifter's output is written into the output register. The last step into
// 00000 (from 00001) does not shift, because the linear range and the
// position above it share the same three low data bits.
//
// Interface: start is taken only when busy is low. din and mode are sampled
// on the start edge. done pulses for one cycle when code has been updated.
// Timing: with P the mode's top bit index (13, 14 or 15) and L the index of
// the leading one of din (within the mode's width), the word takes
// S = P - max(L, 3) steps, or P - 2 steps when L < 3 or din is zero; done
// rises S + 2 clock edges after the start edge, so 3 to 15 cycles.
//
// The split into shift register, state machine, bit shifter and output
// register follows the document's block diagram. The start/busy/done
// handshake, the controller and the reset are this design's own.
module data_compressor
  import compressor_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,   // asynchronous, active low
  input  logic               start,
  input  comp_mode_e         mode,
  input  logic [DATA_W-1:0]  din,
  output logic               busy,
  output logic               done,    // one-cycle pulse, code updated
  output logic [CODE_W-1:0]  code,
  output logic               code_valid,
  output comp_state_t        state    // state word, for observation
);

  logic        ld, step, sr_shift, capture;
  logic        sr_top;
  logic [5:0]  sr_mant;
  logic [7:0]  shifted;
  logic        m14, m16;

  typedef enum logic {IDLE, RUN} ctrl_e;
  ctrl_e ctrl;

  // Mode pins of the state machine, held for the whole conversion.
  comp_mode_e mode_q;
  assign m14 = (mode_q == MODE_14);
  assign m16 = (mode_q == MODE_16);

  assign ld       = (ctrl == IDLE) && start;
  assign capture  = (ctrl == RUN) && (sr_top || state == comp_state_t'(5'b00000));
  assign step     = (ctrl == RUN) && !capture;
  assign sr_shift = step && (state != comp_state_t'(5'b00001));
  assign busy     = (ctrl == RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl   <= IDLE;
      mode_q <= MODE_16;
    end else begin
      if (ld) begin
        ctrl   <= RUN;
        mode_q <= mode;
      end else if (capture) begin
        ctrl   <= IDLE;
      end
    end
  end

  input_shift_register #(.W(DATA_W)) u_sr (
    .clk   (clk),
    .load  (ld),
    .shift (sr_shift),
    .mode  (mode),
    .din   (din),
    .top   (sr_top),
    .mant  (sr_mant)
  );

  // The preset must see the new mode on the start edge.
  compressor_state_machine u_sm (
    .clk  (clk),
    .ld   (ld),
    .step (step),
    .m14  (ld ? (mode == MODE_14) : m14),
    .m16  (m16),
    .q    (state)
  );

  bit_shift u_bs (
    .q    (state),
    .mant (sr_mant),
    .code (shifted)
  );

  output_register u_out (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (capture),
    .d      (shifted),
    .q      (code),
    .valid  (code_valid),
    .strobe (done)
  );

  // The leading one must never be shifted out of the register.
  a_no_shift_past_one: assert property (@(posedge clk) disable iff (!rst_n)
    !(sr_shift && sr_top));

endmodule
