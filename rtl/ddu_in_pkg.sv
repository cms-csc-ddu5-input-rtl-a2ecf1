// Shared types and constants of the DDU input controller.
//
// The FIFO word format is fixed by the input units: each 18-bit FIFO word is
// {LAST, FILL, data[15:0]}, and two of them form one 36-bit read word, so
// bit 16/34 is the FILL flag and bit 17/35 the LAST flag of the two halves.
// A FILL word carries the "C" code (0xC000) with the FILL flag set. An E-code
// is a DMB trailer word (top nibble E); is_ecode takes the FILL flag and the
// top nibble of the data. The LAST flag of a word is not part
// of the E-code test.
package ddu_in_pkg;

  // One 18-bit half of a FIFO word.
  typedef struct packed {
    logic        last;
    logic        fill;
    logic [15:0] data;
  } half_t;

  localparam logic [15:0] FILL_CODE  = 16'hC000;
  localparam logic [3:0]  E_CODE     = 4'hE;

  // A 16-bit word is an E-code (DMB trailer word) when its top nibble is E.
  function automatic logic is_ecode(logic fill, logic [3:0] code);
    return !fill && (code == E_CODE);
  endfunction

endpackage
