// dlatch: level-sensitive D latch with true and complementary outputs.
// Transparent while en is high, holds while en is low. Q and Q-not come
// from the same stored value, so they change together. This is
// intentionally a latch (it is the building block of dff).
module dlatch (
  input  logic en,
  input  logic d,
  output logic q,
  output logic qn
);

  always_latch begin
    if (en) q = d;
  end

  assign qn = ~q;

endmodule
