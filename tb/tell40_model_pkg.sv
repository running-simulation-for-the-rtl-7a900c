// tell40_model_pkg: testbench-side decoder of the front-end GBT bit stream,
// playing the role of the readout board. It collects the data fields of the
// data frames (header 0x5), most significant bit first, and cuts them back
// into events for the VV and FV encodings; it also holds reference
// expressions for the event content (hit count, channel values) written
// directly from their definition.
package tell40_model_pkg;
  import minidaq_pkg::*;

  typedef struct {
    int unsigned bxid;
    int          kind;     // 0 no data, 1 zero-suppressed, 2 NZS
    int unsigned len;      // length field as sent
    int unsigned info;     // FV info field
    int unsigned vals[$];
  } dec_event_t;

  class link_decoder;
    bit          bits[$];
    int unsigned bxw, lenw, chw, channels, infow;
    bit          fv;

    function new(int unsigned bxw, int unsigned lenw, int unsigned chw,
                 int unsigned channels, bit fv, int unsigned infow = 2);
      this.bxw = bxw; this.lenw = lenw; this.chw = chw;
      this.channels = channels; this.fv = fv; this.infow = infow;
    endfunction

    function void clear();
      bits.delete();
    endfunction

    function void push_data(logic [111:0] data, int unsigned data_w);
      for (int i = int'(data_w) - 1; i >= 0; i--) bits.push_back(data[i]);
    endfunction

    function int unsigned peek(int unsigned pos, int unsigned n);
      int unsigned v = 0;
      for (int unsigned i = 0; i < n; i++) v = (v << 1) | int'(bits[pos + i]);
      return v;
    endfunction

    // Parse one complete event from the front of the stream; 0 if the stream
    // does not yet hold a whole event.
    function bit next_event(output dec_event_t e);
      int unsigned pos, nodata, len, n, nzs;
      e.vals.delete();
      if (bits.size() < bxw + 1) return 0;
      e.bxid = peek(0, bxw);
      pos = bxw;
      if (!fv) begin
        nodata = peek(pos, 1); pos += 1;
        e.info = 0;
        if (nodata) begin
          e.kind = 0; e.len = 0;
          repeat (pos) void'(bits.pop_front());
          return 1;
        end
        if (bits.size() < pos + lenw) return 0;
        len = peek(pos, lenw); pos += lenw;
        nzs = (len == (1 << lenw) - 1);
      end else begin
        if (bits.size() < pos + infow + lenw) return 0;
        e.info = peek(pos, infow); pos += infow;
        len = peek(pos, lenw); pos += lenw;
        nzs = e.info[1];
        nodata = e.info[0];
      end
      e.len = len;
      e.kind = nodata ? 0 : (nzs ? 2 : 1);
      n = nodata ? 0 : (nzs ? channels : len);
      if (bits.size() < pos + n * chw) return 0;
      for (int unsigned k = 0; k < n; k++) begin
        e.vals.push_back(peek(pos, chw));
        pos += chw;
      end
      repeat (pos) void'(bits.pop_front());
      return 1;
    endfunction
  endclass

  // Reference content of an event, from its definition.
  function automatic int unsigned ref_hits(int unsigned seed, int unsigned channels,
                                           int unsigned occ_e4);
    int unsigned h = 0;
    for (int unsigned ch = 0; ch < channels; ch++)
      if (int'(mix16(16'(seed), 16'(ch))) < int'((occ_e4 * 65536) / 10000)) h++;
    return h;
  endfunction

  function automatic int unsigned ref_zs(int unsigned seed, int unsigned k, int unsigned chw);
    int unsigned v = int'(zs_value(16'(seed), 16'(k))) % (1 << chw);
    return (v == 0) ? 1 : v;
  endfunction

  function automatic int unsigned ref_nzs(int unsigned seed, int unsigned ch, int unsigned chw);
    return int'(nzs_value(16'(seed), 16'(ch))) % (1 << chw);
  endfunction

endpackage
