// mtd_controller -- sequencer of the multi-stage threshold decoder.
//
// A block goes through four states.  ST_LOAD accepts one received position
// per in_valid cycle; after M positions comes one ST_INIT cycle (syndromes,
// WBF weights, DR cleared).  ST_DECODE runs decoding passes of M cycles, one
// information position per cycle.  A component decoder ends when a pass
// flips no bit or after its maximum number of passes; a feedback round runs
// component A, then component B.  Decoding stops when, within one round,
// both components ended because a pass flipped nothing, or after the
// maximum number of rounds.  ST_OUTPUT then emits the M positions, and the
// controller returns to ST_LOAD with a one-cycle done pulse.
// The stop rules follow the decoder description (stop when no bit is flipped,
// and feedback ends when both component decoders meet their stop condition
// together); the state encoding and timing are this design's own.
module mtd_controller #(
  parameter int unsigned M = mtd_pkg::M_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mtd_pkg::sched_t       sched,      // sampled in ST_INIT
  input  logic                  in_valid,   // a received position is offered
  input  logic                  flip_any,   // a bit is flipped this cycle
  output mtd_pkg::dec_state_e   state,
  output logic                  in_ready,
  output logic                  load_en,    // accept and shift in a position
  output logic                  init_en,
  output logic                  dec_en,     // decoding step this cycle
  output logic                  out_en,     // output step this cycle
  output mtd_pkg::alg_e         alg,        // rule of the current pass
  output logic [11:0]            passes,     // passes run on this block
  output logic                  done        // last output position this cycle
);
  import mtd_pkg::*;

  localparam int unsigned PW = $clog2(M);

  dec_state_e     state_q;
  logic [PW-1:0]  pos_q;
  logic           comp_q;      // 0: component A, 1: component B
  logic [5:0]     iter_q;
  logic [4:0]     round_q;
  logic           flipped_q;   // a bit was flipped earlier in this pass
  logic           conv_a_q;    // A ended without flips in this round
  logic [11:0]     passes_q;
  sched_t         sched_q;

  wire last_pos = (pos_q == PW'(M - 1));
  wire [5:0] iter_max = comp_q ? sched_q.iter_b : sched_q.iter_a;

  assign state    = state_q;
  assign in_ready = (state_q == ST_LOAD);
  assign load_en  = in_ready && in_valid;
  assign init_en  = (state_q == ST_INIT);
  assign dec_en   = (state_q == ST_DECODE);
  assign out_en   = (state_q == ST_OUTPUT);
  assign alg      = comp_q ? sched_q.alg_b : sched_q.alg_a;
  assign passes   = passes_q;
  assign done     = out_en && last_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= ST_LOAD;
      pos_q     <= '0;
      comp_q    <= 1'b0;
      iter_q    <= '0;
      round_q   <= '0;
      flipped_q <= 1'b0;
      conv_a_q  <= 1'b0;
      passes_q  <= '0;
      sched_q   <= SCHED_HARD_MTD_DR;
    end else begin
      unique case (state_q)
        ST_LOAD: if (in_valid) begin
          pos_q <= last_pos ? '0 : pos_q + 1'b1;
          if (last_pos) state_q <= ST_INIT;
        end
        ST_INIT: begin
          sched_q   <= sched;
          passes_q  <= '0;
          round_q   <= '0;
          iter_q    <= '0;
          flipped_q <= 1'b0;
          conv_a_q  <= (sched.iter_a == 0);
          comp_q    <= (sched.iter_a == 0);
          state_q   <= (sched.iter_a == 0 && sched.iter_b == 0) ? ST_OUTPUT : ST_DECODE;
        end
        ST_DECODE: begin
          pos_q     <= last_pos ? '0 : pos_q + 1'b1;
          flipped_q <= last_pos ? 1'b0 : (flipped_q | flip_any);
          if (last_pos) begin : pass_end
            logic any, comp_end, conv_a, conv_b;
            any      = flipped_q | flip_any;
            comp_end = !any || (iter_q + 6'd1 >= iter_max);
            passes_q <= passes_q + 1'b1;
            if (!comp_end) begin
              iter_q <= iter_q + 6'd1;
            end else if (!comp_q && sched_q.iter_b != 0) begin
              conv_a_q <= !any;
              comp_q   <= 1'b1;
              iter_q   <= '0;
            end else begin
              conv_a = comp_q ? conv_a_q : !any;
              conv_b = comp_q ? !any : 1'b1;
              if ((conv_a && conv_b) || (round_q + 5'd1 >= sched_q.rounds)) begin
                state_q <= ST_OUTPUT;
              end else begin
                round_q  <= round_q + 5'd1;
                comp_q   <= (sched_q.iter_a == 0);
                conv_a_q <= (sched_q.iter_a == 0);
                iter_q   <= '0;
              end
            end
          end
        end
        ST_OUTPUT: begin
          pos_q <= last_pos ? '0 : pos_q + 1'b1;
          if (last_pos) state_q <= ST_LOAD;
        end
        default: state_q <= ST_LOAD;
      endcase
    end
  end

endmodule
