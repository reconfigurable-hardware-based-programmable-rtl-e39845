// switch_sync: brings the slide-switch inputs into the clock domain.
//
// Each of the WIDTH asynchronous inputs passes through two flip-flops, so
// the rest of the design sees a switch change two clock cycles later and
// never a metastable level. The flip-flops clear to zero on reset, which
// reads as "motor stopped". The switches are slow mechanical inputs; this
// stage is this design's addition and not part of the original description.
module switch_sync #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst,    // asynchronous clear, active high
  input  logic [WIDTH-1:0] d,      // asynchronous switch levels
  output logic [WIDTH-1:0] q       // synchronized levels
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
