// edac_inf: error detection and correction for the RAM, with error flags.
//
// RAM words carry 16 data bits and 6 check bits of an extended Hamming code
// (single-error correcting, double-error detecting). Data bit i sits at
// position pos(i) of a 21-bit Hamming codeword, where pos() runs through
// 3,5,6,7,9,...,15,17,...,21 (the positions that are not powers of two).
// Check bit k (k=0..4) is the XOR of the data bits whose position has bit k
// set; check bit 5 is the XOR of all data and the other five check bits, so
// a good word has even overall parity.
//
// Write side: wcheck is the check field for wdata (combinational).
// Read side: the check bits are recomputed from rdata and XORed with rcheck
// to give the syndrome. Odd overall parity means a single error: a syndrome
// that is a data position flips that bit of cdata, a power of two or zero
// means a check bit was hit and the data is good. Even parity with a nonzero
// syndrome, or odd parity with a syndrome beyond 21, is an uncorrectable
// double error. single_err/double_err are combinational; sec_flag/ded_flag
// are sticky copies taken on the pclk edge where rd_done is high, cleared by
// por or flag_clr.
//
// The design description names this EDAC and flag block and states that it
// costs one RAM wait state; the code, the widths and the flag behaviour are
// this design's choices.
module edac_inf (
  input  logic        pclk,
  input  logic        por,
  input  logic [15:0] wdata,
  output logic [5:0]  wcheck,
  input  logic [15:0] rdata,
  input  logic [5:0]  rcheck,
  output logic [15:0] cdata,
  output logic        single_err,
  output logic        double_err,
  input  logic        rd_done,
  input  logic        flag_clr,
  output logic        sec_flag,
  output logic        ded_flag
);
  // Codeword position of data bit i.
  function automatic logic [4:0] data_pos(int unsigned i);
    int unsigned n;
    n = 0;
    for (int unsigned p = 1; p <= 21; p++) begin
      if ((p & (p - 1)) != 0) begin
        if (n == i) return 5'(p);
        n++;
      end
    end
    return '0;
  endfunction

  function automatic logic [15:0][4:0] all_pos();
    logic [15:0][4:0] t;
    for (int unsigned i = 0; i < 16; i++) t[i] = data_pos(i);
    return t;
  endfunction

  // MASK[k] marks the data bits covered by check bit k.
  function automatic logic [4:0][15:0] check_masks();
    logic [4:0][15:0] m;
    logic [4:0]       p;
    m = '0;
    for (int unsigned i = 0; i < 16; i++) begin
      p = data_pos(i);
      for (int unsigned k = 0; k < 5; k++) m[k][i] = p[k];
    end
    return m;
  endfunction

  localparam logic [15:0][4:0] POS  = all_pos();
  localparam logic [4:0][15:0] MASK = check_masks();

  function automatic logic [4:0] hamming(logic [15:0] d);
    logic [4:0] c;
    for (int unsigned k = 0; k < 5; k++) c[k] = ^(d & MASK[k]);
    return c;
  endfunction

  logic [4:0] wham;
  assign wham   = hamming(wdata);
  assign wcheck = {^{wdata, wham}, wham};

  logic [4:0] syndrome;
  logic       parity_odd;

  assign syndrome   = hamming(rdata) ^ rcheck[4:0];
  assign parity_odd = ^{rdata, rcheck};

  always_comb begin
    cdata      = rdata;
    single_err = 1'b0;
    double_err = 1'b0;
    if (parity_odd) begin
      if (syndrome > 5'd21) begin
        double_err = 1'b1;
      end else begin
        single_err = 1'b1;
        for (int unsigned i = 0; i < 16; i++) begin
          if (POS[i] == syndrome) cdata[i] = ~rdata[i];
        end
      end
    end else if (syndrome != '0) begin
      double_err = 1'b1;
    end
  end

  always_ff @(posedge pclk or posedge por) begin
    if (por) begin
      sec_flag <= 1'b0;
      ded_flag <= 1'b0;
    end else if (flag_clr) begin
      sec_flag <= 1'b0;
      ded_flag <= 1'b0;
    end else if (rd_done) begin
      if (single_err) sec_flag <= 1'b1;
      if (double_err) ded_flag <= 1'b1;
    end
  end
endmodule
