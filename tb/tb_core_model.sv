// Stand-in for the logic of a core under test: computes the fault-free
// response to the pattern in the scan chain, combinationally, with the
// function tb_golomb_pkg::core_response. Behavioural, for testbenches only.
module tb_core_model #(
  parameter int unsigned LEN = 16,
  parameter int unsigned CAP = 16
) (
  input  logic [LEN-1:0] cells,
  output logic [CAP-1:0] resp
);
  always_comb begin
    for (int unsigned j = 0; j < CAP; j++)
      resp[j] = cells[j] ^ (cells[(j + 1) % LEN] & cells[(j + 2) % LEN])
              ^ cells[(j * 7 + 3) % LEN] ^ (j % 5 == 0);
  end
endmodule
