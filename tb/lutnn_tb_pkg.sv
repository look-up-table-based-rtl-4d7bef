// lutnn_tb_pkg: instruction-word builders and a LUT-network reference model
// shared by the testbenches of the LUT-neuron inference extension.
// The word layout is the one documented in lutnn_pkg.
package lutnn_tb_pkg;
  import lutnn_pkg::*;

  typedef logic [INSTR_W-1:0] word_t;

  function automatic word_t hdr(opcode_t op, int unsigned count);
    word_t w = '0;
    w[INSTR_W-1 -: 3] = op;
    w[INSTR_W-4 -: 5] = 5'(count);
    return w;
  endfunction

  // Predict field k: {lutNumber, outputAddr}
  function automatic word_t set_predict(word_t w, int unsigned k, int unsigned lut_num,
                                        int unsigned out_addr);
    w[k*FIELD_W +: FIELD_W] = {12'(lut_num), 12'(out_addr)};
    return w;
  endfunction

  function automatic word_t set_io_store(word_t w, int unsigned k, int unsigned addr, bit value);
    w[k*FIELD_W +: FIELD_W] = {11'd0, value, 12'(addr)};
    return w;
  endfunction

  function automatic word_t set_io_read(word_t w, int unsigned k, int unsigned addr);
    w[k*FIELD_W +: FIELD_W] = {12'd0, 12'(addr)};
    return w;
  endfunction

  // DM store j: data {dataH0, dataL1, dataL0} with the configuration in the
  // low 136 bits; the unused upper bits are filled with junk to show that
  // they are ignored.
  function automatic word_t set_dm_store(word_t w, int unsigned j, int unsigned dm,
                                         int unsigned addr, lut_cfg_t cfg);
    logic [DMS_DATA_W-1:0] data;
    data = '0;
    data[CFG_W-1:0] = cfg;
    data[DMS_DATA_W-1:CFG_W] = {$urandom(), 24'($urandom())};  // ignored bits
    w[j*DMS_DATA_W +: DMS_DATA_W] = data;
    w[2*DMS_DATA_W + j*FIELD_W +: FIELD_W] = {3'($urandom()), 5'(dm), 4'($urandom()), 12'(addr)};
    return w;
  endfunction

  function automatic lut_cfg_t rand_cfg(int unsigned in_lo, int unsigned in_n);
    lut_cfg_t c;
    for (int i = 0; i < LUT_K; i++) c.sel[i] = 12'(in_lo + ($urandom() % in_n));
    c.lut = {$urandom(), $urandom()};
    return c;
  endfunction

  // Reference: Algorithm "predict" of one neuron on a bit vector.
  function automatic bit eval_lut(lut_cfg_t c, logic [4095:0] io);
    int unsigned a = 0;
    for (int i = 0; i < LUT_K; i++) a |= int'(io[c.sel[i]]) << i;
    return c.lut[a];
  endfunction

endpackage
