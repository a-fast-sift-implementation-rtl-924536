// pe_comm: communication unit of a processing element.
//
// Every PE drives the value it sends onto the torus (tx = the value of its
// source register) and picks up, in the same cycle, the value sent by one of
// its four neighbours. dir names the neighbour the value comes from (north,
// east, south, west). The torus wrap-around is in the array wiring, not
// here. The one-hop, one-cycle transfer is this design's choice.
//
// Interface: send is the value offered, nbr_in[d] the value offered by the
// neighbour in direction d; tx goes to the network, rx to the register file.
module pe_comm
  import simd_pkg::*;
(
  input  dir_e  dir,
  input  word_t send,
  input  word_t nbr_in [4],
  output word_t tx,
  output word_t rx
);
  assign tx = send;

  always_comb begin
    unique case (dir)
      DIR_N: rx = nbr_in[0];
      DIR_E: rx = nbr_in[1];
      DIR_S: rx = nbr_in[2];
      DIR_W: rx = nbr_in[3];
      default: rx = '0;
    endcase
  end
endmodule
