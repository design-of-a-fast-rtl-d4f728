// threshold_generator: frame threshold (mean grey level) generator.
//
// Watches the pixel bus of an image system and computes the threshold of a
// frame, the mean of its ROWS x COLS pixels, T = sum(P_ij) / (ROWS*COLS),
// while the frame streams in at one pixel per clock. The sum is built by the
// pipelined adder_accumulator; since ROWS*COLS is a power of two, the mean is
// the sum shifted right by log2(ROWS*COLS) (bits 23:16 for 256 x 256).
//
// Sequence: frame_start clears the accumulator (the INIT of the original)
// and the pixel counter. Each pixel_valid cycle then feeds one pixel. After
// the last pixel of the frame, the accumulator still holds carries in its
// pipeline, so the controller feeds it NSLICE-1 (5) words of zero, as the
// original does to flush it, and then raises threshold_valid. threshold_valid
// thus rises on the 5th clock edge after the edge that accepted the last
// pixel, and stays high, with threshold and sum held, until the next
// frame_start. Pixels arriving while flushing or done are ignored.
//
// The accumulator, its adders, the flush length and the mean follow the
// original design; the pixel counter, the state machine, the asynchronous
// reset and the ignoring of surplus pixels are this design's own choices.
// FAULT_TOLERANT = 1 builds every slice from the fault-tolerant adders;
// faults injects stuck-at values into them for test (tie to '0 in use).
// The accumulator's per-slice carry_ff output is left open on purpose: only
// its pending flag is needed here. rst_n also disables the flush assertion
// during reset, which is why a linter sees it used both ways.
module threshold_generator
  import adder_pkg::*;
#(
  parameter int unsigned ROWS           = 256,
  parameter int unsigned COLS           = 256,
  parameter int unsigned ACC_W          = 24,
  parameter int unsigned PIX_W          = 8,
  parameter bit          FAULT_TOLERANT = 1'b1,
  localparam int unsigned NSLICE        = ACC_W / NIB,
  localparam int unsigned NPIX          = ROWS * COLS,
  localparam int unsigned SHIFT         = $clog2(NPIX),
  localparam int unsigned CNT_W         = SHIFT + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              pixel_valid,
  input  logic [PIX_W-1:0]  pixel,
  input  ft_faults_t        faults [NSLICE],
  output logic [PIX_W-1:0]  threshold,
  output logic              threshold_valid,
  output logic [ACC_W-1:0]  sum,
  output logic              busy
);
  if ((1 << SHIFT) != NPIX)
  begin : g_bad_frame
    $error("threshold_generator: ROWS*COLS must be a power of two");
  end
  if (ACC_W < PIX_W + SHIFT)
  begin : g_bad_width
    $error("threshold_generator: ACC_W too narrow for the frame sum");
  end

  typedef enum logic [1:0] {IDLE, ACCUM, FLUSH, DONE} state_t;

  state_t            state_q;
  logic [CNT_W-1:0]  cnt_q;      // pixels accepted, then flush words fed
  logic              acc_init, acc_valid;
  logic [PIX_W-1:0]  acc_pixel;
  logic              pending;

  always_comb begin
    acc_init  = frame_start;
    acc_valid = 1'b0;
    acc_pixel = '0;
    unique case (state_q)
      ACCUM: begin
        acc_valid = pixel_valid;
        acc_pixel = pixel;
      end
      FLUSH:   acc_valid = 1'b1;   // zero words push the carries to the top
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      cnt_q   <= '0;
    end else if (frame_start) begin
      state_q <= ACCUM;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        ACCUM: if (pixel_valid) begin
          if (cnt_q == CNT_W'(NPIX - 1)) begin
            state_q <= FLUSH;
            cnt_q   <= '0;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        FLUSH: begin
          if (cnt_q == CNT_W'(NSLICE - 2)) state_q <= DONE;
          cnt_q <= cnt_q + 1'b1;
        end
        default: ;
      endcase
    end
  end

  adder_accumulator #(.ACC_W(ACC_W), .PIX_W(PIX_W), .FAULT_TOLERANT(FAULT_TOLERANT)) u_acc (
    .clk(clk), .rst_n(rst_n), .init(acc_init), .data_valid(acc_valid), .pixel(acc_pixel),
    .faults(faults), .acc(sum), .carry_ff(), .pending(pending)
  );

  assign threshold       = PIX_W'(sum >> SHIFT);
  assign threshold_valid = (state_q == DONE);
  assign busy            = (state_q == ACCUM) || (state_q == FLUSH);

  // Once flushed, no carry may be left in the pipeline.
  a_flushed: assert property (@(posedge clk) disable iff (!rst_n)
                              (state_q == DONE) |-> !pending);
endmodule
