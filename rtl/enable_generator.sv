// Enable generator of the low power test pattern generator.
// A one-hot ring of NE flip-flops: while run is high it moves one place per
// clock, and e (bit 0 is E1) enables exactly one operand slice register per
// cycle, E1 first. cnt_en is high in the cycle of the last enable, so the Gray
// counter steps on the same clock edge that copies its current value into the
// last slice; the next cycle starts loading the new value at E1. Both outputs
// are low while run is low. That only one slice is loaded at a time follows the
// TPG description; the ring-counter structure is this design's choice.
module enable_generator #(
  parameter int unsigned NE = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          run,
  output logic [NE-1:0] e,
  output logic          cnt_en
);

  localparam logic [NE-1:0] FIRST = NE'(1);

  logic [NE-1:0] ring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ring <= FIRST;
    else if (clr) ring <= FIRST;
    else if (run) ring <= {ring[NE-2:0], ring[NE-1]};
  end

  assign e      = run ? ring : '0;
  assign cnt_en = run & ring[NE-1];

  // The ring must stay one-hot.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ring));

endmodule
