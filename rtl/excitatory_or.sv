// excitatory_or: lateral excitatory connections between the WTA modules of a TOM.
//
// A stored message is a clique: one class neuron in each of the NUM_WTA WTA modules. The
// document realises the excitatory synapses of a clique with a multi-input OR gate, so
// that any winner of the clique activates all the other members. This block builds, for
// every class neuron (x, c), the OR of its own winner bit and, for each valid stored
// message m whose member in module x is class c, the winner bits of m's members in the
// other modules. A message with one or more erased patterns is thereby completed from the
// patterns that were recognised.
//
// Interface (purely combinational): winners[x] is module x's one-hot winner vector;
// msg_valid[m] marks a stored message and msg_class[m][x] is its class index in module x.
// retrieved[x] is the completed message. A module can show more than one active class when
// its own winner disagrees with a message activated by the other modules; both are kept,
// as an OR does.
//
// Following the document: the OR of clique members (Figures 8 and 9). Own choice: the
// connections are stored per message as class indices, rather than as a full
// neuron-to-neuron connection matrix; both describe the same cliques.
module excitatory_or #(
  parameter int unsigned NUM_WTA   = tom_pkg::NUM_WTA,
  parameter int unsigned NUM_CLASS = tom_pkg::NUM_CLASS,
  parameter int unsigned MAX_MSG   = tom_pkg::MAX_MSG,
  localparam int unsigned CLS_W    = $clog2(NUM_CLASS)
) (
  input  logic [NUM_WTA-1:0][NUM_CLASS-1:0]          winners,
  input  logic [MAX_MSG-1:0]                         msg_valid,
  input  logic [MAX_MSG-1:0][NUM_WTA-1:0][CLS_W-1:0] msg_class,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0]          retrieved
);

  always_comb begin
    retrieved = winners;
    for (int m = 0; m < MAX_MSG; m++) begin
      for (int x = 0; x < NUM_WTA; x++) begin
        logic others;
        others = 1'b0;
        for (int y = 0; y < NUM_WTA; y++)
          if (y != x) others |= winners[y][msg_class[m][y]];
        if (msg_valid[m] && others && (32'(msg_class[m][x]) < NUM_CLASS))
          retrieved[x][msg_class[m][x]] = 1'b1;
      end
    end
  end

endmodule
