// pld_rom -- read-only memory built as a PLD: fixed AND plane, programmable OR plane.
//
// The AND plane is a full decoder: one product line per minterm of the N_IN address
// inputs, so minterm m is 1 exactly when addr == m. Only the OR plane is programmed:
// output bit o ORs the minterms m whose bit CONTENTS[m][o] is set. CONTENTS is therefore
// the function table of the N_OUT functions, i.e. word m of the memory.
//
// Interface: addr[N_IN-1:0] -> data[N_OUT-1:0]. Timing: combinational (asynchronous read).
//
// Structure from the lecture's description of a ROM as a PLD; the default size (3 inputs,
// 4 outputs) and the default contents (word m holds m with its parity bit above it, so an
// unchanged instance is a parity generator) are this design's own.
module pld_rom #(
  parameter int unsigned N_IN  = 3,
  parameter int unsigned N_OUT = 4,
  parameter logic [(1<<N_IN)-1:0][N_OUT-1:0] CONTENTS = parity_table(N_IN, N_OUT)
) (
  input  logic [N_IN-1:0]  addr,
  output logic [N_OUT-1:0] data
);
  localparam int unsigned N_MIN = 1 << N_IN;

  function automatic logic [(1<<N_IN)-1:0][N_OUT-1:0] parity_table(int unsigned ni, int unsigned no);
    logic [(1<<N_IN)-1:0][N_OUT-1:0] t;
    for (int m = 0; m < (1 << ni); m++) t[m] = N_OUT'((m | (int'(^m) << ni)) & ((1 << no) - 1));
    return t;
  endfunction
  logic [N_MIN-1:0] minterm;

  // fixed AND plane: every minterm is a product line
  always_comb begin
    for (int m = 0; m < N_MIN; m++)
      minterm[m] = (addr == N_IN'(m));
  end

  // programmable OR plane
  always_comb begin
    data = '0;
    for (int m = 0; m < N_MIN; m++)
      data |= minterm[m] ? CONTENTS[m] : '0;
  end
endmodule
