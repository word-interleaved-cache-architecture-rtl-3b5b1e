// wi_pkg: constants and types shared by the word-interleaved (WI) cache.
//
// The processor-side word is 4 bytes (the baseline cache "outputs only 4B of
// data"); the controller state type of the WI cache lives here so that test
// code can name the states too.
package wi_pkg;

  // Width of a processor load/store in bytes.
  localparam int unsigned CPU_BYTES = 4;

  // Controller states of wi_cache.
  typedef enum logic [2:0] {
    S_IDLE,      // waiting for a request; may issue the array read at once
    S_ISSUE,     // array read one cycle late (fast-hit buffer miss or wake-up)
    S_LOOKUP,    // tag compare; hit served, miss picks a victim
    S_RESP,      // registered response
    S_WB_READ,   // read the dirty victim line from all data ways
    S_WB_SEND,   // hand the victim line to the lower level
    S_FILL_REQ,  // request the missing line from the lower level
    S_FILL_WAIT  // wait for the line, write it into all data ways
  } wi_state_e;

endpackage
