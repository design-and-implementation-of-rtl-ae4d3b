// fft_stage: one stage of the serial-pipelined radix-2 DIT FFT.
//
// The stage follows the chain of the processor architecture: shift register,
// add & subtract, register, twiddle factor multiplier, register. It owns a
// single butterfly, used serially, and all stages run at once, each working
// on whatever data has reached it, so a new 16-sample frame can enter while
// the previous frame is still in the later stages.
//
// Stage STAGE (1..4) has butterfly span H = 2^(STAGE-1): it combines flow-graph
// rows p and p+H. Every value carries its row index, so the control needs no
// schedule table. An input beat whose rows have bit H clear is an upper
// operand and is pushed into the shift register. A beat whose rows have bit
// H set carries lower operands; each lane of it, one per cycle, meets the
// partner popped from the shift register and fires the butterfly. Stage 1
// receives one sample per beat (IN_LANES = 1); later stages receive the pair
// of values one butterfly of the previous stage produced (IN_LANES = 2), so a
// lower-operand pair costs two cycles and holds in_ready low for the first.
//
// The twiddle multiplier at the end applies the factor the NEXT stage needs
// on its lower operand: a value on row q is multiplied by
// W_16^((q mod 2H) * 16/(4H)) when bit 2H of q is set, and by W^0 = 1
// otherwise. This is the DIT butterfly of the published architecture with its
// multiplication moved to the end of the previous stage, which is where the
// architecture figure draws the multiplier; stage 1 needs no factor on its
// input (W^0) and the last stage therefore multiplies only by 1.
//
// Stages 2 to 4 take their input through a two-beat fft_beat_fifo
// (FIFO_DEPTH), this design's addition: it absorbs the burst of two-clock
// beats that arrives at the end of each frame, so one sample per clock can
// enter the processor without a stall.
//
// Handshake: valid/ready on both sides; a beat moves when valid and ready
// are both high. Each of the two registers loads whenever it is empty or the
// one after it moves on, so bubbles close up; the butterfly fires only when
// the first register can load, otherwise a lower-operand beat waits (stall).
// Upper operands go straight into the shift register and never wait.
// Latency: a butterfly result appears two clocks after its lower operand
// leaves the input buffer (add & subtract -> register -> multiply -> register). The upper
// output (row p) leaves on lane 0, the lower (row p+H) on lane 1.
module fft_stage
  import fft_pkg::*;
#(
  parameter int unsigned STAGE    = 1,
  parameter int unsigned IN_LANES = (STAGE == 1) ? 1 : 2,
  parameter int unsigned FIFO_DEPTH = (STAGE == 1) ? 0 : 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data [IN_LANES],
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data [2]
);

  localparam int unsigned H  = 1 << (STAGE - 1);
  localparam int unsigned H2 = 2 * H;

  // ---- input buffer (none in stage 1) ----------------------------------
  logic    b_valid, b_ready;
  sample_t b_data [IN_LANES];

  if (FIFO_DEPTH > 0) begin : g_fifo
    fft_beat_fifo #(.DEPTH(FIFO_DEPTH), .LANES(IN_LANES)) u_fifo (
      .clk, .rst_n,
      .in_valid, .in_ready, .in_data,
      .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data)
    );
  end else begin : g_direct
    assign b_valid  = in_valid;
    assign in_ready = b_ready;
    assign b_data   = in_data;
  end

  // ---- control -----------------------------------------------------------
  logic    en1, en2, lower_half, push, fire, last_lane;
  logic    r1_valid;
  logic    lane_sel;
  sample_t cur, partner;
  sample_t push_d [2];

  assign en2        = !out_valid || out_ready;
  assign en1        = !r1_valid || en2;
  assign lower_half = (int'(b_data[0].pos) & H) != 0;
  assign cur        = (IN_LANES == 2 && lane_sel) ? b_data[IN_LANES-1] : b_data[0];
  assign last_lane  = (IN_LANES == 1) || lane_sel;
  assign push       = b_valid && !lower_half;
  assign fire       = b_valid && lower_half && en1;
  assign b_ready    = !lower_half || (en1 && last_lane);
  assign push_d[0]  = b_data[0];
  assign push_d[1]  = b_data[IN_LANES-1];

  always_ff @(posedge clk) begin
    if (!rst_n)                         lane_sel <= 1'b0;
    else if (fire && IN_LANES == 2)     lane_sel <= !lane_sel;
  end

  // ---- shift register ----------------------------------------------------
  logic [$clog2(H+1)-1:0] sr_count;

  fft_shift_reg #(.DEPTH(H)) u_sr (
    .clk, .rst_n,
    .push, .push_two(IN_LANES == 2),
    .d(push_d),
    .pop(fire),
    .tail(partner),
    .count(sr_count)
  );

  // ---- add & subtract ----------------------------------------------------
  cplx_t   bf_sum, bf_diff;
  sample_t bf_out [2];

  fft_addsub u_addsub (.a(partner.v), .b(cur.v), .sum(bf_sum), .diff(bf_diff));

  always_comb begin
    bf_out[0].v   = bf_sum;
    bf_out[0].pos = partner.pos;
    bf_out[0].inv = cur.inv;
    bf_out[1].v   = bf_diff;
    bf_out[1].pos = cur.pos;
    bf_out[1].inv = cur.inv;
  end

  // ---- register ----------------------------------------------------------
  sample_t r1 [2];

  fft_pair_reg u_reg1 (
    .clk, .rst_n, .en(en1),
    .d_valid(fire), .d(bf_out),
    .q_valid(r1_valid), .q(r1)
  );

  // ---- twiddle factor multiplier ------------------------------------------
  // Exponent for the next stage's lower operand; zero for an upper operand
  // and throughout the last stage (H2 = 16 lies above the row bits).
  function automatic logic [2:0] next_k(input pos_t q);
    int unsigned qi;
    qi = int'(q);
    if ((qi & H2) != 0) return 3'((qi % H2) * (N / (2 * H2)));
    else                return 3'd0;
  endfunction

  sample_t tw_out [2];

  for (genvar l = 0; l < 2; l++) begin : g_tw
    fft_twiddle_mul u_tw (
      .x(r1[l].v), .k(next_k(r1[l].pos)), .inv(r1[l].inv), .y(tw_out[l].v)
    );
    assign tw_out[l].pos = r1[l].pos;
    assign tw_out[l].inv = r1[l].inv;
  end

  // ---- register ----------------------------------------------------------
  fft_pair_reg u_reg2 (
    .clk, .rst_n, .en(en2),
    .d_valid(r1_valid), .d(tw_out),
    .q_valid(out_valid), .q(out_data)
  );

  // ---- protocol rules ----------------------------------------------------
  a_partner_row: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> (int'(partner.pos) + H == int'(cur.pos)));
  a_partner_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> (sr_count != 0));
  a_partner_mode: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> (partner.inv == cur.inv));
  a_lanes_same_half: assert property (@(posedge clk) disable iff (!rst_n)
    b_valid |-> (((int'(b_data[0].pos) ^ int'(b_data[IN_LANES-1].pos)) & H) == 0));
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> out_valid);

endmodule
