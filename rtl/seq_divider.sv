// seq_divider: unsigned restoring divider, q = n / d and r = n mod d,
// one quotient bit per clock.
//
// Used by the D-term unit to form 1/det(W0). A pulse on start loads the
// operands; done pulses NW cycles later with the result in q and r, which
// then hold until the next start. busy is high in between; a start while
// busy is ignored. Division by zero gives q = all ones and r = n.
module seq_divider #(
  parameter int unsigned NW = 37,   // dividend width
  parameter int unsigned DW = 32    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n,
  input  logic [DW-1:0] d,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] q,
  output logic [DW-1:0] r
);

  localparam int unsigned CW = $clog2(NW + 1);

  logic [DW-1:0] rem;      // partial remainder, always below d
  logic [NW-1:0] num;      // dividend bits still to bring down
  logic [DW-1:0] dv;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;
  logic          fits;

  always_comb begin
    trial = {rem, num[NW-1]};
    fits  = trial >= {1'b0, dv};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      num  <= '0;
      dv   <= '0;
      cnt  <= '0;
      q    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem  <= '0;
          num  <= n;
          dv   <= d;
          cnt  <= CW'(NW);
          busy <= 1'b1;
        end
      end else begin
        rem <= DW'(fits ? trial - {1'b0, dv} : trial);
        num <= num << 1;
        q   <= {q[NW-2:0], fits};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign r = rem;

endmodule
