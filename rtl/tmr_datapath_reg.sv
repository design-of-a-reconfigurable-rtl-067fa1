// Triplicated pipeline register for the data path, without auto-correction.
//
// The same next value d is captured by three registers on the same clock, and
// a bitwise two-out-of-three majority voter drives q. An upset in one copy is
// masked at q; it is not repaired, but since the data path loads new data on
// every 25 ns bunch crossing, the upset copy is overwritten on the next
// enabled edge. This structure follows the design's single-event-effect
// scheme for the data path. The load enable en and the asynchronous active-low
// reset to zero are this implementation's choice.
//
// Timing: q shows d one clock after an edge with en = 1.
module tmr_datapath_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] q_a, q_b, q_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q_a <= '0;
    else if (en) q_a <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q_b <= '0;
    else if (en) q_b <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q_c <= '0;
    else if (en) q_c <= d;
  end

  assign q = (q_a & q_b) | (q_a & q_c) | (q_b & q_c);

endmodule
