// Behavioural model of the scan chains of the circuit under test, used by the
// decompressor testbenches. Each of the N chains has L cells; cell 0 is the
// first cell (it receives scan_in and drives head). With shift_en the chains
// shift by one towards the last cell; with capture_en every cell loads the
// response bit given on resp (standing in for the circuit's response). The
// cells are cleared by reset.
module scan_chains_model #(
  parameter int unsigned N = 31,
  parameter int unsigned L = 54
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               shift_en,
  input  logic               capture_en,
  input  logic [N-1:0]       scan_in,
  input  logic [N-1:0][L-1:0] resp,
  output logic [N-1:0]       head,
  output logic [N-1:0][L-1:0] cells
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cells <= '0;
    else if (capture_en) cells <= resp;
    else if (shift_en)
      for (int i = 0; i < N; i++) cells[i] <= {cells[i][L-2:0], scan_in[i]};
  end
  always_comb for (int i = 0; i < N; i++) head[i] = cells[i][0];
endmodule
