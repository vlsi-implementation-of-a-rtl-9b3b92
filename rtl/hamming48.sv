// hamming48: Hamming single-error-correcting code for the 48-bit external
// SRAM data bus.
//
// The 48-bit bus word is a shortened Hamming(63,57) codeword: 42 data bits
// and 6 check bits. Codeword positions are numbered 1..48; the check bits sit
// at positions 1, 2, 4, 8, 16 and 32 and the data bits fill the other
// positions in ascending order (bus bit k holds position k+1). Check bit 2^j
// makes the XOR of all positions whose number has bit j set equal to zero.
// On read, the syndrome (XOR of the numbers of all set positions) is zero for
// a clean word, names the flipped position for a single bit error (which is
// corrected), and is above 48 for some multi-bit errors, which are reported
// as uncorrectable. The split 42 + 6 is this design's choice; the bus width
// and the single-error correction are the unit's specification.
//
// Both directions are combinational. The code is systematic, so the 42 data
// positions of enc_code are the enc_data bits wired straight through; only
// the six check bits are computed.
module hamming48 (
  input  logic [41:0] enc_data,      // data to be written
  output logic [47:0] enc_code,      // codeword driven on the bus
  input  logic [47:0] dec_code,      // codeword read from the bus
  output logic [41:0] dec_data,      // corrected data
  output logic        dec_corrected, // a single bit error was corrected
  output logic        dec_uncorrectable // syndrome points outside the word
);
  localparam int unsigned N = 48;

  function automatic logic is_pow2(int unsigned p);
    return (p & (p - 1)) == 0;
  endfunction

  // encode
  always_comb begin
    logic [N:1]   cw;
    int unsigned  d;
    logic [5:0]   syn;
    cw = '0;
    d  = 0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (!is_pow2(p)) begin
        cw[p] = enc_data[d];
        d++;
      end
    end
    syn = '0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (cw[p]) syn ^= 6'(p);
    end
    for (int unsigned j = 0; j < 6; j++) cw[1 << j] = syn[j];
    enc_code = cw;
  end

  // decode
  always_comb begin
    logic [N:1]   cw;
    logic [5:0]   syn;
    int unsigned  d;
    cw  = dec_code;
    syn = '0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (cw[p]) syn ^= 6'(p);
    end
    dec_corrected     = 1'b0;
    dec_uncorrectable = 1'b0;
    if (syn != 6'd0) begin
      if (int'(syn) <= N) begin
        cw[syn]       = ~cw[syn];
        dec_corrected = 1'b1;
      end else begin
        dec_uncorrectable = 1'b1;
      end
    end
    d = 0;
    dec_data = '0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (!is_pow2(p)) begin
        dec_data[d] = cw[p];
        d++;
      end
    end
  end
endmodule
