// dram_pkg: request format of the 128-bit DRAM access bus shared by the decoder's DRAM masters.
// A read returns nwords_m1+1 consecutive 128-bit words, in order, on the response channel
// (rsp_valid/rsp_data, no back-pressure: a master must take every word of its read).
// A write carries one word with a byte-enable mask. Addresses count 128-bit words.
package dram_pkg;
  localparam int unsigned ADDR_W = 28;
  localparam int unsigned DATA_W = 128;

  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [3:0]        nwords_m1;  // read burst length - 1 (1..16 words)
    logic [DATA_W-1:0] wdata;
    logic [15:0]       wmask;      // byte enables of a write
  } dram_req_t;
endpackage
