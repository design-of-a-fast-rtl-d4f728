// adder_accumulator: pipelined 24-bit adder accumulator.
//
// Adds one PIX_W-bit word per clock to an ACC_W-bit running sum without a
// full-width carry chain. The sum is cut into 4-bit slices, each with its own
// 4-bit adder and its own stored nibble D; a slice's carry out is stored in a
// carry flip-flop (FF1..FF5 for the 24-bit default) and added into the next
// slice on the next accepted word. The clock period therefore only has to
// cover one 4-bit adder, whatever ACC_W is. The slices that receive pixel
// bits use full adders (full_adder4, two for an 8-bit pixel, the lowest with
// carry in 0); the others only add a carry bit and use partial adders
// (partial_adder4).
//
// Per accepted word i, for slice k (FF_0 = 0, P_k = 0 above the pixel):
//   D_k(i) = D_k(i-1) + P_k(i) + FF_k(i-1)  mod 16
//   FF_{k+1}(i) = carry of that sum
// A carry produced by the last word reaches the top slice NSLICE-1 accepted
// words later, so after the last data word NSLICE-1 further words of zero
// (5 for 24 bits) must be accepted before acc holds the full sum. The carry
// out of the top slice is dropped: ACC_W is sized so the sum cannot overflow.
//
// Interface: data_valid accepts pixel on the rising clock edge (this merges
// the original's input latch and its store/retrieve latch pair per register
// into one edge-triggered flip-flop); init clears all sum and carry
// registers synchronously and wins over data_valid; rst_n clears them
// asynchronously. acc is the stored sum D (the result once flushed);
// carry_ff shows the carry flip-flops, and pending is high while any of them
// still holds a carry. FAULT_TOLERANT selects ft_full_adder4 and
// ft_partial_adder4 for every slice; faults[k] then injects stuck-at values
// into slice k for test (tie to '0 in use; unused when FAULT_TOLERANT = 0).
module adder_accumulator
  import adder_pkg::*;
#(
  parameter int unsigned ACC_W          = 24,
  parameter int unsigned PIX_W          = 8,
  parameter bit          FAULT_TOLERANT = 1'b1,
  localparam int unsigned NSLICE        = ACC_W / NIB,
  localparam int unsigned NFULL         = PIX_W / NIB
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    init,
  input  logic                    data_valid,
  input  logic [PIX_W-1:0]        pixel,
  input  ft_faults_t              faults [NSLICE],
  output logic [ACC_W-1:0]        acc,
  output logic [NSLICE-2:0]       carry_ff,
  output logic                    pending
);
  if (ACC_W % NIB != 0 || PIX_W % NIB != 0 || NFULL < 1 || NFULL >= NSLICE)
  begin : g_bad_size
    $error("adder_accumulator: ACC_W and PIX_W must be multiples of 4 with PIX_W < ACC_W");
  end

  logic [NIB-1:0] d_q   [NSLICE];   // stored nibbles D
  logic [NIB-1:0] d_nxt [NSLICE];   // adder sums
  logic [NSLICE-1:0] cout;          // adder carry outs
  logic [NSLICE-1:0] cin;           // carry into each slice

  assign cin = {carry_ff, 1'b0};

  for (genvar k = 0; k < NSLICE; k++) begin : g_slice
    if (k < NFULL) begin : g_full
      logic [NIB-1:0] pnib;
      assign pnib = pixel[k*NIB +: NIB];
      if (FAULT_TOLERANT) begin : g_ft
        ft_full_adder4 u_add (.a(d_q[k]), .b(pnib), .cin(cin[k]), .faults(faults[k]),
                              .s(d_nxt[k]), .cout(cout[k]));
      end else begin : g_plain
        full_adder4 u_add (.a(d_q[k]), .b(pnib), .cin(cin[k]), .s(d_nxt[k]), .cout(cout[k]));
      end
    end else begin : g_part
      if (FAULT_TOLERANT) begin : g_ft
        ft_partial_adder4 u_add (.a(d_q[k]), .cin(cin[k]), .faults(faults[k]),
                                 .s(d_nxt[k]), .cout(cout[k]));
      end else begin : g_plain
        partial_adder4 u_add (.a(d_q[k]), .cin(cin[k]), .s(d_nxt[k]), .cout(cout[k]));
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          d_q[k] <= '0;
      else if (init)       d_q[k] <= '0;
      else if (data_valid) d_q[k] <= d_nxt[k];
    end

    assign acc[k*NIB +: NIB] = d_q[k];
  end

  // Carry flip-flops FF1..FF(NSLICE-1): carry_ff[k] holds the carry out of slice k.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          carry_ff <= '0;
    else if (init)       carry_ff <= '0;
    else if (data_valid) carry_ff <= cout[NSLICE-2:0];
  end

  assign pending = |carry_ff;
endmodule
