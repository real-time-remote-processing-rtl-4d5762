// dense_l2: second fully connected layer, N_IN -> N_OUT (200 -> 100), ReLU.
// It consumes one input value per clock (PARA_IN = 1) as the batch
// normalisation produces it and multiplies it by the matching weight row
// for all PARA_OUT = N_OUT neurons at once, each with its own accumulator
// (the row-wise walk of the weight matrix). When the last input of a vector
// arrives the sums are scaled back to Q8.8 (shift by FR), saturated, passed
// through ReLU and registered as the "layer 2 results" pipeline register,
// while the accumulators restart for the next vector.
// Weight memory: N_IN words of N_OUT x 16 bits, written one weight at a
// time with w_addr = {input index, output index}.
// Interface: in_valid/in_idx/x (one value per clock, index N_IN-1 closes the
// vector) -> out_valid pulse and h (N_OUT x 16 bits), 3 clocks after the last
// input.
module dense_l2 #(
  parameter int unsigned N_IN  = 200,
  parameter int unsigned N_OUT = 100,
  parameter int unsigned FR    = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         w_we,
  input  logic [$clog2(N_IN)+$clog2(N_OUT)-1:0] w_addr,
  input  logic signed [15:0]           w_data,
  input  logic                         in_valid,
  input  logic [$clog2(N_IN)-1:0]      in_idx,
  input  logic signed [15:0]           x,
  output logic                         out_valid,
  output logic [N_OUT*16-1:0]          h
);
  localparam int unsigned IW  = $clog2(N_IN);
  localparam int unsigned OW  = $clog2(N_OUT);
  localparam int unsigned ACW = 32 + $clog2(N_IN) + 1;

  logic [N_OUT*16-1:0] wmem [N_IN];
  always_ff @(posedge clk)
    if (w_we) wmem[w_addr[IW+OW-1:OW]][w_addr[OW-1:0]*16 +: 16] <= w_data;

  // stage 1: read the weight row
  logic               v1, last1;
  logic signed [15:0] x1;
  logic [N_OUT*16-1:0] row;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; last1 <= 1'b0; x1 <= '0; row <= '0; end
    else begin
      v1    <= in_valid;
      last1 <= (in_idx == IW'(N_IN - 1));
      x1    <= x;
      row   <= wmem[in_idx];
    end
  end

  // stage 2: N_OUT products
  logic               v2, last2;
  logic signed [31:0] prod [N_OUT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v2 <= 1'b0; last2 <= 1'b0; end
    else begin v2 <= v1; last2 <= last1; end
  end
  for (genvar j = 0; j < N_OUT; j++) begin : g_p
    always_ff @(posedge clk) prod[j] <= x1 * $signed(row[j*16 +: 16]);
  end

  // stage 3: accumulate; close the vector on its last input
  logic signed [ACW-1:0] acc [N_OUT];
  for (genvar j = 0; j < N_OUT; j++) begin : g_a
    logic signed [ACW-1:0] tot;
    logic signed [63:0]    sc;
    assign tot = acc[j] + ACW'(prod[j]);
    assign sc  = 64'(tot >>> FR);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[j] <= '0; h[j*16 +: 16] <= '0;
      end else if (v2) begin
        if (last2) begin
          acc[j]        <= '0;
          h[j*16 +: 16] <= (sc < 0) ? 16'sd0 : lis_pkg::sat16(sc);
        end else begin
          acc[j] <= tot;
        end
      end
    end
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0; else out_valid <= v2 && last2;
endmodule
