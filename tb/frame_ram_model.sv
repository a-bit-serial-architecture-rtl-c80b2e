// Behavioural model of the external reference-picture memory (not
// synthesizable logic of the design). One read request per clock is granted
// unless the random stall setting withholds the grant; data returns in order
// LAT clocks after the grant. Contents come from frame_ref_pkg::word_at.
module frame_ram_model #(
  parameter int ADDR_W   = 18,
  parameter int LAT      = 3,
  parameter int STALL_PCT = 0      // percentage of clocks without a grant
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic [ADDR_W-1:0] addr,
  output logic              gnt,
  output logic              rvalid,
  output logic [31:0]       rdata,
  output int                words_read
);
  logic        v_pipe [LAT];
  logic [31:0] d_pipe [LAT];
  logic        stall;

  always_ff @(posedge clk) stall <= (STALL_PCT > 0) && ($urandom_range(0, 99) < STALL_PCT);
  assign gnt = !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) v_pipe[i] <= 1'b0;
      words_read <= 0;
    end else begin
      v_pipe[0] <= req && gnt;
      d_pipe[0] <= frame_ref_pkg::word_at(int'(addr));
      for (int i = 1; i < LAT; i++) begin
        v_pipe[i] <= v_pipe[i-1];
        d_pipe[i] <= d_pipe[i-1];
      end
      if (req && gnt) words_read <= words_read + 1;
    end
  end
  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];
endmodule
