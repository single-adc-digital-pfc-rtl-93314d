// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// start loads num and den; NUM_W clocks later done pulses with quo = num/den
// (floor). den = 0 gives an all-ones quotient. busy is high while dividing;
// a start while busy is ignored.
module seq_divider #(
  parameter int unsigned NUM_W = 22,
  parameter int unsigned DEN_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quo
);
  localparam int unsigned CW = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q;
  logic [DEN_W-1:0] rem;
  logic [DEN_W-1:0] d;
  logic [CW-1:0]    step;
  logic [DEN_W:0]   trial;

  always_comb trial = {rem, q[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      rem  <= '0;
      d    <= '0;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q    <= num;
          d    <= den;
          rem  <= '0;
          step <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (trial >= {1'b0, d}) begin
          rem <= DEN_W'(trial - {1'b0, d});
          q   <= {q[NUM_W-2:0], 1'b1};
        end else begin
          rem <= DEN_W'(trial);
          q   <= {q[NUM_W-2:0], 1'b0};
        end
        if (step == CW'(NUM_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= {q[NUM_W-2:0], (trial >= {1'b0, d})};
        end
        step <= step + 1'b1;
      end
    end
  end

endmodule
