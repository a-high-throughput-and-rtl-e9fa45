// csd_encoder: canonic signed digit (CSD) recoding of one activation.
//
// The DACs are 1-bit, so an activation is applied one digit per iteration.
// Recoding it into CSD form (digits -1, 0, +1, never two non-zero digits
// next to each other) removes runs of ones and so reduces the number of
// non-zero digits that drive the crossbar rows. The recoding walks from the
// least significant bit with a carry: a position whose bit plus carry is one
// becomes -1 (carry one) when the next bit is also one, else +1; a sum of
// two gives 0 with carry one. The input is signed two's complement and the
// sign bit is used as the bit above the top, so A_BITS digits always suffice
// (this design's choice; activations after ReLU simply have a zero sign bit).
// Purely combinational:  a = sum_i (pos[i] - neg[i]) * 2**i.
module csd_encoder #(
  parameter int unsigned A_BITS = rram_pkg::A_BITS
) (
  input  logic signed [A_BITS-1:0] act,
  output logic [A_BITS-1:0]        pos_digits,
  output logic [A_BITS-1:0]        neg_digits
);

  always_comb begin
    logic carry;
    logic nxt;
    logic [1:0] v;
    carry      = 1'b0;
    pos_digits = '0;
    neg_digits = '0;
    for (int i = 0; i < A_BITS; i++) begin
      nxt = (i == A_BITS - 1) ? act[A_BITS-1] : act[i+1];
      v   = {1'b0, act[i]} + {1'b0, carry};
      if (v == 2'd1) begin
        if (nxt) begin
          neg_digits[i] = 1'b1;
          carry         = 1'b1;
        end else begin
          pos_digits[i] = 1'b1;
          carry         = 1'b0;
        end
      end else begin
        carry = (v == 2'd2);
      end
    end
  end

endmodule
