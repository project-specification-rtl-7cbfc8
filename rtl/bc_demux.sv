// bc_demux - BC de-multiplexing and error detection of one 10-bit input field.
//
// A field carries, per bunch crossing, one 8-bit tower value with its odd-parity
// bit (`data_next`, parity in bit 8) and the BC-multiplexing flag (`bcf_next`).
// Two towers (A and B) share the field: a non-empty crossing is sent in two
// consecutive slots, and the flag tells which tower each slot belongs to.
//   Phase tracking: the phase register is set to 1 by an empty slot (NO_DATA)
//   and toggles on every non-empty one, so phase 0 marks the first slot of a pair.
//   Assignment, from the current slot (DATA), its phase, the current, previous and
//   next flags and the next slot:
//     A <= DATA       if (ph=0, f=0) or (ph=1, f=1, f_prev=1)
//     B <= DATA       if (ph=0, f=1) or (ph=1, f=1, f_prev=0)
//     B <= DATA_NEXT  else if (ph=0, f=0, f_next=0)
//   every other tower value is NO_DATA (zero).
// Error handling: a slot with even parity is an error.  The outputs are zeroed for
// the slot in error, for the first slot of a pair whose second slot is in error,
// and for every slot after an error until the next empty slot, which
// re-establishes the pairing.  `chk_en` low disables checking (error mask);
// `link_en` low forces both towers to zero (link mask).  With `mux_on` low the
// field is taken as tower A of each crossing and tower B is zero.
// Timing: a slot sampled on clock edge n gives its towers on the outputs after
// edge n+1 (the next slot is looked at before the output register is loaded).
// The phase and assignment rules and the zeroing rules follow the specification;
// the registered outputs, the parity bit position and the mux-off behaviour are
// this design's choices.
module bc_demux
  import cp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   mux_on,
  input  logic   chk_en,
  input  logic   link_en,
  input  field_t data_next,
  input  logic   bcf_next,
  output tower_t tower_a,
  output tower_t tower_b,
  output logic   err            // an error was detected (registered with the towers)
);
  field_t data;
  logic   phase, bcf, bcf_prev;
  logic   sticky;               // error seen, waiting for an empty slot
  tower_t a_n, b_n;               // tower values (NO_DATA carries zero data)
  logic   par_err_cur, par_err_next, zero;

  assign par_err_cur  = ~^data;        // odd parity expected
  assign par_err_next = ~^data_next;

  always_comb begin
    a_n = '0;
    b_n = '0;
    if (!mux_on) begin
      a_n = data[7:0];
    end else begin
      if ((!phase && !bcf) || (phase && bcf && bcf_prev)) a_n = data[7:0];
      if ((!phase && bcf) || (phase && bcf && !bcf_prev)) b_n = data[7:0];
      else if (!phase && !bcf && !bcf_next)              b_n = data_next[7:0];
    end
  end

  // zero the current outputs?
  always_comb
    zero = chk_en && (par_err_cur || sticky ||
                      (mux_on && !phase && par_err_next));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      data     <= NO_DATA;
      phase    <= 1'b1;
      bcf      <= 1'b0;
      bcf_prev <= 1'b0;
      sticky   <= 1'b0;
      tower_a  <= '0;
      tower_b  <= '0;
      err      <= 1'b0;
    end else begin
      data     <= data_next;
      phase    <= (data_next == NO_DATA) ? 1'b1 : ~phase;
      bcf      <= bcf_next;
      bcf_prev <= bcf;
      // error state: set by a parity error, cleared by the next empty slot
      if (!chk_en || data_next == NO_DATA) sticky <= 1'b0;
      else if (par_err_next)               sticky <= 1'b1;
      tower_a  <= (zero || !link_en) ? '0 : a_n;
      tower_b  <= (zero || !link_en) ? '0 : b_n;
      err      <= zero;
    end
endmodule
