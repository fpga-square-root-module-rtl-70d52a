// sqrt_ctrl: sequencing controller of the square root module.
//
// It counts the p-bit root blocks still to be found and runs the datapath
// through them one iteration at a time:
//   ST_IDLE  ready is high; start loads the radicand register (x_load).
//   ST_ROM   one cycle: the look-up table reads the radicand's MSBs (rom_en);
//            the first iteration is armed with pos at the top pending block
//            and use_rom set, so the iteration starts from the table's root.
//   ST_RUN   each iteration is started by a one-cycle launch pulse. When the
//            comparison tree reports its winner (tree_valid) the root
//            register is loaded (q_load). The module stops there, with a
//            one-cycle done pulse, if the winning remainder is zero (an exact
//            root, found early) or if pos has reached bit 0; otherwise pos
//            drops by BLOCK_BITS and the next iteration is launched on the
//            following cycle.
// Stopping on a zero remainder and counting down the pending blocks follow the
// source algorithm; the state encoding and the start/ready/done handshake are
// this implementation's choice. Reset is synchronous and active low.
//
// Timing: start accepted at edge 0, table read at edge 1, launch high in the
// cycle after each root update, done after edge 1 + k*(5+BLOCK_BITS) when k
// iterations were used.
module sqrt_ctrl
  import sqrt_pkg::*;
#(
  parameter int unsigned IN_WIDTH   = 32,
  parameter int unsigned ROM_BITS   = 8,
  parameter int unsigned BLOCK_BITS = 2,
  localparam int unsigned N      = IN_WIDTH / 2,
  localparam int unsigned POS_W  = $clog2(N),
  localparam int unsigned ITERS  = num_iters(IN_WIDTH, ROM_BITS, BLOCK_BITS),
  localparam int unsigned ITER_W = $clog2(ITERS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              tree_valid,   // comparison tree winner is valid
  input  logic              rem_zero,     // winner's remainder is zero
  output logic              ready,
  output logic              x_load,
  output logic              rom_en,
  output logic              launch,       // start one iteration
  output logic              use_rom,      // iteration base is the table root
  output logic [POS_W-1:0]  pos,          // LSB position of the block in flight
  output logic              q_load,       // load the winning candidate
  output logic              done,
  output logic [ITER_W-1:0] iter_count    // iterations used by this result
);

  localparam int unsigned POS0 = N - ROM_BITS / 2 - BLOCK_BITS;

  if ((ROM_BITS % 2) != 0 || ROM_BITS >= IN_WIDTH ||
      ((N - ROM_BITS / 2) % BLOCK_BITS) != 0) begin : g_bad_config
    $error("sqrt_ctrl: ROM_BITS must be even, below IN_WIDTH, and leave a whole number of BLOCK_BITS-wide root blocks");
  end

  ctrl_state_e state;
  logic        launch_r;
  logic        last;

  assign ready  = (state == ST_IDLE);
  assign x_load = ready && start;
  assign rom_en = (state == ST_ROM);
  assign launch = launch_r;
  assign q_load = (state == ST_RUN) && tree_valid;
  assign last   = rem_zero || (pos == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      launch_r   <= 1'b0;
      use_rom    <= 1'b0;
      pos        <= '0;
      done       <= 1'b0;
      iter_count <= '0;
    end else begin
      launch_r <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) state <= ST_ROM;
        ST_ROM: begin
          state      <= ST_RUN;
          launch_r   <= 1'b1;
          use_rom    <= 1'b1;
          pos        <= POS_W'(POS0);
          iter_count <= '0;
        end
        ST_RUN: if (tree_valid) begin
          use_rom    <= 1'b0;
          iter_count <= iter_count + 1'b1;
          if (last) begin
            done  <= 1'b1;
            state <= ST_IDLE;
          end else begin
            pos      <= pos - POS_W'(BLOCK_BITS);
            launch_r <= 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The datapath reports a winner only while an iteration is in flight.
  a_tree_in_run: assert property (@(posedge clk) disable iff (!rst_n)
                                  tree_valid |-> state == ST_RUN);
  // done is a single-cycle pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                 done |=> !done);

endmodule
