// list_record: one record of the list L that remembers, for every pixel of the
// previous image line, which hot spot it belongs to.
//
// The record is an ID_W-bit register (idA) plus a comparator and a multiplexer.
// Every pixel clock enable the register loads the value offered by the record in
// front of it (or the id of the new pixel, for the first record). The record in
// turn offers its own idA to the record behind it, except while two hot spots are
// being unified and idA equals the id of the hot spot being absorbed
// (hot_spot_y): it then offers the id of the surviving hot spot (hot_spot_x).
// This way the whole list is shifted by one position and relabelled in the same
// clock. The structure follows the record drawing of the design; the enable,
// the asynchronous reset to 0 (id 0 = cold pixel) and the port names are this
// implementation's choices.
//
// Timing: id_q changes on the rising clock edge when en is high; id_fwd is
// combinational from id_q, unify, id_x and id_y.
module list_record #(
  parameter int unsigned ID_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,       // pixel clock enable: shift the list
  input  logic [ID_W-1:0] id_in,    // value offered by the previous record
  input  logic            unify,    // "need to unify?"
  input  logic [ID_W-1:0] id_x,     // id of the surviving hot spot
  input  logic [ID_W-1:0] id_y,     // id of the absorbed hot spot
  output logic [ID_W-1:0] id_q,     // stored id (idA)
  output logic [ID_W-1:0] id_fwd    // value offered to the next record
);

  logic hit;

  always_comb begin
    hit    = unify && (id_q == id_y);
    id_fwd = hit ? id_x : id_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  id_q <= '0;
    else if (en) id_q <= id_in;
  end

endmodule
